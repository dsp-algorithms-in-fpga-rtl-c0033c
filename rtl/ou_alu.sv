// ou_alu: the arithmetical module of an Operational Unit.
//
// Computes one operation of ou_pkg::op_e on the two operands a and b
// delivered by the input multiplexers. The result is combinational; the
// OU writes it to its registers at the end of the cycle. The module holds
// one piece of state, a wide accumulator for multiply-accumulate (OP_MAC
// adds a*b to it, OP_MACZ restarts it with a*b); it changes only when
// `en` is high, i.e. in the cycle the Control Unit executes the word.
// Products of MULQ/MAC/MACZ are returned in fractional (Q(W-1)) form,
// shifted right by W-1 and truncated to W bits; no operation saturates.
// OP_DIV is not computed here (see ou_div) and returns 0; OP_NOP returns 0.
//
// The architecture leaves the operation set to the user; this set, the
// fractional scaling and the wrap-around arithmetic are this design's choice.
module ou_alu
  import ou_pkg::*;
#(
  parameter int DATA_W = 16,
  parameter int GUARD  = 8       // extra accumulator bits above the 2W product
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] res
);
  localparam int ACC_W = 2*DATA_W + GUARD;

  logic signed [DATA_W-1:0]   sa, sb;
  logic signed [2*DATA_W-1:0] prod;
  logic signed [ACC_W-1:0]    acc_q, acc_d;
  logic        [ACC_W-1:0]    acc_sh;
  logic        [2*DATA_W-1:0] prod_sh;

  assign sa   = signed'(a);
  assign sb   = signed'(b);
  assign prod = sa * sb;

  always_comb begin
    acc_d = acc_q;
    unique case (op)
      OP_MAC:  acc_d = acc_q + ACC_W'(prod);
      OP_MACZ: acc_d = ACC_W'(prod);
      default: acc_d = acc_q;
    endcase
  end

  assign acc_sh  = acc_d >>> (DATA_W-1);
  assign prod_sh = prod  >>> (DATA_W-1);

  always_comb begin
    unique case (op)
      OP_PASS: res = a;
      OP_ADD:  res = a + b;
      OP_SUB:  res = a - b;
      OP_MUL:  res = prod[DATA_W-1:0];
      OP_MULQ: res = prod_sh[DATA_W-1:0];
      OP_MAC,
      OP_MACZ: res = acc_sh[DATA_W-1:0];
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_XOR:  res = a ^ b;
      OP_SHL:  res = a << b[3:0];
      OP_SRA:  res = DATA_W'(sa >>> b[3:0]);
      OP_MAX:  res = (sa > sb) ? a : b;
      OP_MIN:  res = (sa < sb) ? a : b;
      default: res = '0;   // OP_NOP, OP_DIV
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= acc_d;
  end

endmodule
