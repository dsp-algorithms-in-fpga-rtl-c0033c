// tb_ou_alu: self-checking test of the arithmetical module.
// Drives random operands through every operation and compares the result
// with a reference written with plain integer arithmetic; checks that the
// accumulator adds up a random dot product (MACZ then MAC) and holds its
// value when `en` is low.
module tb_ou_alu;
  import ou_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 0;
  op_e op;
  logic [W-1:0] a, b, res;
  int checks = 0, failures = 0;
  longint acc_ref;

  ou_alu #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_op(op_e o, logic [W-1:0] x, logic [W-1:0] y);
    longint sx, sy, p;
    sx = longint'(signed'(x)); sy = longint'(signed'(y)); p = sx * sy;
    case (o)
      OP_PASS: return x;
      OP_ADD:  return W'(sx + sy);
      OP_SUB:  return W'(sx - sy);
      OP_MUL:  return W'(p);
      OP_MULQ: return W'(p / (64'sd1 << (W-1)) - ((p < 0 && (p % (64'sd1 << (W-1))) != 0) ? 1 : 0));
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_SHL:  return W'(x * (1 << y[3:0]));
      OP_SRA:  return W'(sx >>> y[3:0]);
      OP_MAX:  return (sx > sy) ? x : y;
      OP_MIN:  return (sx < sy) ? x : y;
      default: return '0;
    endcase
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    op = OP_NOP; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // combinational operations
    for (int i = 0; i < 1500; i++) begin
      op_e o;
      o = op_e'(4'($urandom_range(0, 14)));
      if (o == OP_MAC || o == OP_MACZ) o = OP_ADD;
      op = o; a = W'($urandom); b = W'($urandom);
      if (i < 20) begin a = 16'h8000; b = (i % 2) ? 16'h8000 : 16'h7fff; end
      #1;
      check($sformatf("%s a=%h b=%h", o.name(), a, b), res, ref_op(o, a, b));
      @(negedge clk);
    end
    // multiply-accumulate: dot product of 8 random pairs, Q15 result
    for (int t = 0; t < 20; t++) begin
      acc_ref = 0;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        op = (i == 0) ? OP_MACZ : OP_MAC;
        a = W'($urandom); b = W'($urandom);
        acc_ref = ((i == 0) ? 0 : acc_ref) + longint'(signed'(a)) * longint'(signed'(b));
        en = 1; #1;
        check("mac", res, W'(acc_ref >>> (W-1)));
      end
      @(negedge clk);
      en = 0;
      op = OP_MAC; a = 16'h4000; b = 16'h4000;   // not enabled: acc must hold
      @(negedge clk); #1;
      check("acc hold", res, W'((acc_ref + 64'h1000_0000) >>> (W-1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
