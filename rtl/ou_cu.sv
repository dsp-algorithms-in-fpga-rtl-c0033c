// ou_cu: the Control Unit of one Operational Unit.
//
// A small microcoded state machine. After reset it is idle; a `start` pulse
// makes it fetch word 0 and run. Each cycle it holds one microcode word
// `instr` (read from the synchronous code memory at the address it put on
// `code_addr` the cycle before) and decides whether the word can execute:
//   - an operand marked wait_a / wait_b that comes from a neighbour channel
//     or the external port needs "data available" on that channel;
//   - a word that writes the output register needs every consumer of the
//     previous value to have acknowledged it (`out_busy` low);
//   - OP_DIV needs the divider to have finished (`div_done`).
// When all hold, `fire` is high: the datapath writes its results, the CU
// pulses "data read acknowledge" (`ack_nb`, `ack_ext`) on the channels it
// waited for, and moves to the next word. Otherwise the OU stalls and the
// same word is read again. One word therefore executes per cycle when
// nothing stalls, and branches cost no extra cycle because the next address
// is computed in the cycle the word executes.
// Branches test the zero/negative flags of the word's own result (`res_z`,
// `res_n`, already merged with the held flags for OP_NOP) or the loop
// counter, which a word can load from its result (`wr_lc`). BR_HALT stops
// the unit after the word; `start` restarts it from word 0.
//
// The architecture gives the CU's role (choose source, operation and
// destination each cycle; synchronise with neighbours through "data
// available" / "data read acknowledge"). The word format, the branch set,
// the loop counter and the one-word-per-cycle timing are this design's own.
module ou_cu
  import ou_pkg::*;
#(
  parameter int DATA_W = 16,
  parameter int NIN    = 16,
  parameter int DEPTH  = 256,
  parameter bit HAS_DIV = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  instr_t                   instr,
  output logic [$clog2(DEPTH)-1:0] code_addr,
  input  logic [NIN-1:0]           nb_avail,
  input  logic                     ext_avail,
  input  logic                     out_busy,
  input  logic                     div_busy,
  input  logic                     div_done,
  input  logic                     res_z,
  input  logic                     res_n,
  input  logic [DATA_W-1:0]        res,
  output logic                     fire,
  output logic [NIN-1:0]           ack_nb,
  output logic                     ack_ext,
  output logic                     div_start,
  output logic                     div_clear,
  output logic                     running,
  output logic                     halted
);
  localparam int AW = $clog2(DEPTH);

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_HALT} cstate_e;
  cstate_e state;

  logic [AW-1:0]     pc, pc_next;
  logic [DATA_W-1:0] lc;
  logic              ready_a, ready_b, out_ok, div_ok, operands_ok;
  logic              is_div, taken;

  // Is operand `src` a channel that must be waited for, and is it ready?
  function automatic logic src_ready(input logic [4:0] src, input logic wt,
                                     input logic [NIN-1:0] av, input logic ext_av);
    if (!wt)                  return 1'b1;
    if (src < 5'(NIN))        return av[src[3:0]];
    if (src == SRC_EXT)       return ext_av;
    return 1'b1;
  endfunction

  assign ready_a     = src_ready(instr.src_a, instr.wait_a, nb_avail, ext_avail);
  assign ready_b     = src_ready(instr.src_b, instr.wait_b, nb_avail, ext_avail);
  assign operands_ok = ready_a && ready_b;
  assign is_div      = HAS_DIV && (instr.op == OP_DIV);
  assign out_ok      = !(instr.wr_out && instr.op != OP_NOP) || !out_busy;
  assign div_ok      = !is_div || div_done;

  assign running   = (state == C_RUN);
  assign halted    = (state == C_HALT);
  assign fire      = running && operands_ok && out_ok && div_ok;
  assign div_start = running && is_div && operands_ok && !div_busy && !div_done;
  assign div_clear = fire && is_div;

  always_comb begin
    ack_nb  = '0;
    ack_ext = 1'b0;
    if (fire) begin
      for (int k = 0; k < NIN; k++) begin
        if (instr.wait_a && instr.src_a == 5'(k)) ack_nb[k] = 1'b1;
        if (instr.wait_b && instr.src_b == 5'(k)) ack_nb[k] = 1'b1;
      end
      ack_ext = (instr.wait_a && instr.src_a == SRC_EXT) ||
                (instr.wait_b && instr.src_b == SRC_EXT);
    end
  end

  always_comb begin
    unique case (instr.br)
      BR_JMP:  taken = 1'b1;
      BR_BZ:   taken = res_z;
      BR_BNZ:  taken = !res_z;
      BR_BNEG: taken = res_n;
      BR_BPOS: taken = !res_z && !res_n;
      BR_LOOP: taken = (lc != '0);
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    pc_next = pc;
    if (start && state != C_RUN) pc_next = '0;
    else if (fire)               pc_next = taken ? AW'(instr.target) : pc + 1'b1;
  end

  assign code_addr = pc_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      pc    <= '0;
      lc    <= '0;
    end else begin
      pc <= pc_next;
      unique case (state)
        C_IDLE, C_HALT: if (start) state <= C_RUN;
        C_RUN:          if (fire && instr.br == BR_HALT) state <= C_HALT;
        default:        state <= C_IDLE;
      endcase
      if (fire) begin
        if (instr.wr_lc && instr.op != OP_NOP) lc <= res;
        else if (instr.br == BR_LOOP && taken) lc <= lc - 1'b1;
      end
    end
  end


  // An acknowledge is only given for a word that was announced.
  a_ack_avail: assert property (@(posedge clk) disable iff (!rst_n)
                                (ack_nb & ~nb_avail) == '0);
  a_ext_ack:   assert property (@(posedge clk) disable iff (!rst_n)
                                ack_ext |-> ext_avail);


endmodule
