// tb_ou_div: self-checking test of the iterative divider.
// Random signed operand pairs (plus corner cases and division by zero) are
// divided; the quotient is compared with integer division truncated toward
// zero, `done` must rise exactly DATA_W+1 cycles after the cycle of `start` and stay high
// until `clear`.
module tb_ou_div;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, start = 0, clear = 0, busy, done;
  logic [W-1:0] a, b, q;
  int checks = 0, failures = 0;

  ou_div #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] ref_div(logic [W-1:0] x, logic [W-1:0] y);
    int sx, sy;
    sx = int'(signed'(x)); sy = int'(signed'(y));
    if (sy == 0) return (sx < 0) ? 16'h8000 : 16'h7fff;
    return W'(sx / sy);
  endfunction

  initial begin
    int cyc;
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case (i)
        0: begin a = 16'd100;  b = 16'd7; end
        1: begin a = -16'sd100; b = 16'd7; end
        2: begin a = 16'h8000; b = 16'd1; end
        3: begin a = 16'd5;    b = 16'd0; end
        4: begin a = -16'sd5;  b = 16'd0; end
        5: begin a = 16'h7fff; b = 16'hffff; end
        default: begin
          a = W'($urandom);
          b = (i % 3 == 0) ? W'($urandom_range(1, 300)) : W'($urandom);
        end
      endcase
      start = 1;
      @(negedge clk);
      start = 0;
      a = W'($urandom); b = W'($urandom);   // operands are latched at start
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
        if (cyc > 100) break;
      end
      checks++;
      if (cyc != W + 1) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc, W + 1);
      end
      @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL done not held"); end
      clear = 1;
      @(negedge clk);
      clear = 0;
      checks++;
      if (done || busy) begin failures++; $display("FAIL not idle after clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // quotient check when done first rises
  logic [W-1:0] la, lb;
  logic done_q;
  always @(posedge clk) begin
    if (start) begin la <= a; lb <= b; end
    done_q <= done;
    if (done && !done_q) check($sformatf("q %h/%h", la, lb), q, ref_div(la, lb));
  end
endmodule
