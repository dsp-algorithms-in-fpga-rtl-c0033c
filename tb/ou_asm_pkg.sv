// ou_asm_pkg: helpers for the testbenches to build microcode words
// (ou_pkg::instr_t) field by field, with defaults for everything not given.
package ou_asm_pkg;
  import ou_pkg::*;

  function automatic instr_t mk(
    op_e              op,
    logic [4:0]       a      = SRC_IMM,
    logic [4:0]       b      = SRC_IMM,
    bit               wa     = 1'b0,
    bit               wb     = 1'b0,
    bit               wreg   = 1'b0,
    int               rd     = 0,
    bit               wout   = 1'b0,
    logic [NPORT-1:0] pub    = '0,
    bit               wlc    = 1'b0,
    br_e              br     = BR_NEXT,
    int               target = 0,
    int               imm    = 0
  );
    instr_t w;
    w.op     = op;
    w.src_a  = a;
    w.src_b  = b;
    w.wait_a = wa;
    w.wait_b = wb;
    w.wr_reg = wreg;
    w.rd     = 3'(rd);
    w.wr_out = wout;
    w.pub    = pub;
    w.wr_lc  = wlc;
    w.br     = br;
    w.target = PC_W'(target);
    w.imm    = IMM_W'(imm);
    return w;
  endfunction

  // Source code of local register r.
  function automatic logic [4:0] R(int r);
    return SRC_R0 + 5'(r);
  endfunction

  // Source code of neighbour channel k.
  function automatic logic [4:0] NB(int k);
    return 5'(k);
  endfunction

  // Announce mask with the given neighbour channel(s) and/or the external port.
  function automatic logic [NPORT-1:0] CH(int k);
    return NPORT'(1) << k;
  endfunction
endpackage
