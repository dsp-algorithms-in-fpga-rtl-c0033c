// tb_ou_in_mux: self-checking test of the operand multiplexer.
// Fills every input with distinct random words and checks, for all 32
// select codes, that the right leg (or zero) comes out: the neighbour
// channels, the local registers, the external port, the sign-extended
// immediate and the own output register. A second instance with a reduced
// IN_MASK (the "partially fixed" build) must read masked channels as zero.
module tb_ou_in_mux;
  import ou_pkg::*;
  localparam int W = 16, NIN = 16, NREG = 8;
  localparam logic [15:0] MASK2 = 16'h0F0F;
  logic [4:0] sel;
  logic [W-1:0] nb [NIN];
  logic [W-1:0] regs [NREG];
  logic [W-1:0] ext, own, y, y2;
  logic [IMM_W-1:0] imm;
  int checks = 0, failures = 0;
  logic clk = 0;

  ou_in_mux #(.DATA_W(W), .NIN(NIN), .NREG(NREG)) dut (.*);
  ou_in_mux #(.DATA_W(W), .NIN(NIN), .NREG(NREG), .IN_MASK(MASK2)) dut2 (
    .sel, .nb, .regs, .ext, .imm, .own, .y(y2));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expect_y(int s, logic [15:0] mask);
    if (s < NIN) return mask[s] ? nb[s] : '0;
    if (s >= 16 && s < 16 + NREG) return regs[s-16];
    if (s == 24) return ext;
    if (s == 25) return {{(W-IMM_W){imm[IMM_W-1]}}, imm};
    if (s == 26) return own;
    return '0;
  endfunction

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < NIN; k++) nb[k] = W'($urandom);
      for (int r = 0; r < NREG; r++) regs[r] = W'($urandom);
      ext = W'($urandom); own = W'($urandom); imm = IMM_W'($urandom);
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        @(posedge clk);
        checks += 2;
        if (y !== expect_y(s, 16'hFFFF)) begin
          failures++; $display("FAIL sel=%0d got %h exp %h", s, y, expect_y(s, 16'hFFFF));
        end
        if (y2 !== expect_y(s, MASK2)) begin
          failures++; $display("FAIL masked sel=%0d got %h exp %h", s, y2, expect_y(s, MASK2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
