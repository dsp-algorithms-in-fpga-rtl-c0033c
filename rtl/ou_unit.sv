// ou_unit: one Operational Unit (OU) of the array.
//
// Contents: two input multiplexers (ou_in_mux) in front of the arithmetical
// module (ou_alu, plus an ou_div divider when HAS_DIV is set), a set of
// local registers (ou_regfile), the output register, and the Control Unit
// (ou_cu) with its code memory (ou_code_mem). The output register is what
// every neighbouring OU sees on its multiplexers.
//
// Handshake. The output register carries one "data available" bit per
// channel (`out_avail`, 16 neighbour directions plus the external port).
// A word that writes the output register with a non-zero `pub` mask sets
// those bits; a consumer that reads the value with its wait flag set
// returns "data read acknowledge" on the same channel (`out_ack`), which
// clears that bit. The output register is not overwritten while any bit is
// still set, so no announced value is lost, and each consumer reads each
// announced value exactly once. Reading without the wait flag samples the
// register freely.
//
// Timing: one microcode word per cycle when nothing stalls; results written
// at the end of the cycle are visible to the neighbours (data and
// "available") in the next cycle. An OP_DIV word occupies an OU that has a
// divider for DATA_W+2 cycles once its operands are ready; in an OU without
// one it returns 0 in one cycle.
//
// Neighbour channel k of `nb_*` must be wired to channel k of the OU at
// offset (NB_DN[k], NB_DM[k]); `out_avail[k]`/`out_ack[k]` go to the OU at
// the opposite offset (see dsp_array). Flags: the zero and negative flags
// of the last executed non-NOP result are held for branches.
//
// The parts and their connection (multiplexers at the arithmetic inputs,
// registers, an output register seen by the neighbours, a CU per OU, a
// divider in some OUs only) follow the architecture; the handshake
// protocol, the two-operand form and the flags are this design's choice.
module ou_unit
  import ou_pkg::*;
#(
  parameter int          DATA_W    = 16,
  parameter int          NIN       = 16,
  parameter int          NREG      = 8,
  parameter int          DEPTH     = 256,
  parameter bit          HAS_DIV   = 1'b1,
  parameter bit          CODE_RAM  = 1'b1,
  parameter logic [15:0] IN_MASK   = 16'hFFFF,
  parameter string       INIT_FILE = "",
  parameter int          IMG_WORDS = 256,
  parameter int          BASE      = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  // code memory programming port
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [INSTR_W-1:0]       prog_data,
  // neighbour inputs (channel k = neighbour at offset k)
  input  logic [DATA_W-1:0]        nb_data  [NIN],
  input  logic [NIN-1:0]           nb_avail,
  output logic [NIN-1:0]           nb_ack,
  // output register and its per-channel handshake
  output logic [DATA_W-1:0]        out_data,
  output logic [NIN-1:0]           out_avail,
  input  logic [NIN-1:0]           out_ack,
  // external input and output ports
  input  logic [DATA_W-1:0]        ext_in_data,
  input  logic                     ext_in_avail,
  output logic                     ext_in_ack,
  output logic                     ext_out_avail,
  input  logic                     ext_out_ack,
  // status
  output logic                     running,
  output logic                     halted
);
  localparam int AW = $clog2(DEPTH);
  localparam int RW = $clog2(NREG);

  instr_t             instr;
  logic [INSTR_W-1:0] instr_bits;
  logic [AW-1:0]      code_addr;
  logic [DATA_W-1:0]  regs [NREG];
  logic [DATA_W-1:0]  opa, opb, alu_res, res, div_q;
  logic               fire, div_start, div_clear, div_busy, div_done;
  logic               flag_z, flag_n, res_z, res_n, do_write;
  logic [NPORT-1:0]   pending, pub_mask, acks;

  ou_code_mem #(
    .WIDTH(INSTR_W), .DEPTH(DEPTH), .CODE_RAM(CODE_RAM),
    .INIT_FILE(INIT_FILE), .IMG_WORDS(IMG_WORDS), .BASE(BASE)
  ) u_code (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(code_addr), .rdata(instr_bits)
  );
  assign instr = instr_t'(instr_bits);

  ou_in_mux #(.DATA_W(DATA_W), .NIN(NIN), .NREG(NREG), .IN_MASK(IN_MASK)) u_mux_a (
    .sel(instr.src_a), .nb(nb_data), .regs, .ext(ext_in_data), .imm(instr.imm),
    .own(out_data), .y(opa)
  );
  ou_in_mux #(.DATA_W(DATA_W), .NIN(NIN), .NREG(NREG), .IN_MASK(IN_MASK)) u_mux_b (
    .sel(instr.src_b), .nb(nb_data), .regs, .ext(ext_in_data), .imm(instr.imm),
    .own(out_data), .y(opb)
  );

  ou_alu #(.DATA_W(DATA_W)) u_alu (
    .clk, .rst_n, .en(fire), .op(instr.op), .a(opa), .b(opb), .res(alu_res)
  );

  if (HAS_DIV) begin : g_div
    ou_div #(.DATA_W(DATA_W)) u_div (
      .clk, .rst_n, .start(div_start), .clear(div_clear), .a(opa), .b(opb),
      .busy(div_busy), .done(div_done), .q(div_q)
    );
  end else begin : g_nodiv
    assign div_busy = 1'b0;
    assign div_done = 1'b0;
    assign div_q    = '0;
  end

  assign res      = (HAS_DIV && instr.op == OP_DIV) ? div_q : alu_res;
  assign do_write = fire && (instr.op != OP_NOP);
  assign res_z    = (instr.op == OP_NOP) ? flag_z : (res == '0);
  assign res_n    = (instr.op == OP_NOP) ? flag_n : res[DATA_W-1];

  ou_cu #(.DATA_W(DATA_W), .NIN(NIN), .DEPTH(DEPTH), .HAS_DIV(HAS_DIV)) u_cu (
    .clk, .rst_n, .start, .instr, .code_addr,
    .nb_avail, .ext_avail(ext_in_avail), .out_busy(pending != '0),
    .div_busy, .div_done, .res_z, .res_n, .res,
    .fire, .ack_nb(nb_ack), .ack_ext(ext_in_ack), .div_start, .div_clear,
    .running, .halted
  );

  ou_regfile #(.DATA_W(DATA_W), .NREG(NREG)) u_regs (
    .clk, .rst_n, .we(do_write && instr.wr_reg), .waddr(instr.rd[RW-1:0]),
    .wdata(res), .rdata(regs)
  );

  // Only channels that exist in this build can be announced.
  always_comb begin
    pub_mask = '0;
    pub_mask[EXT_CH] = 1'b1;
    for (int k = 0; k < NIN; k++) pub_mask[k] = 1'b1;
    acks = '0;
    acks[EXT_CH] = ext_out_ack;
    for (int k = 0; k < NIN; k++) acks[k] = out_ack[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0;
      pending  <= '0;
      flag_z   <= 1'b0;
      flag_n   <= 1'b0;
    end else begin
      pending <= (pending & ~acks) |
                 ((do_write && instr.wr_out) ? (instr.pub & pub_mask) : '0);
      if (do_write && instr.wr_out) out_data <= res;
      if (do_write) begin
        flag_z <= res_z;
        flag_n <= res_n;
      end
    end
  end

  assign out_avail     = pending[NIN-1:0];
  assign ext_out_avail = pending[EXT_CH];

  // The output register is only replaced when every consumer has read it.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   (do_write && instr.wr_out) |-> pending == '0);

endmodule
