// tb_ou_regfile: self-checking test of the local register set.
// Checks the reset value, then random writes against a shadow copy, with
// every word compared after every cycle (a write must land in its own word
// only and be visible the next cycle).
module tb_ou_regfile;
  localparam int W = 16, NREG = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr;
  logic [W-1:0] wdata;
  logic [W-1:0] rdata [NREG];
  logic [W-1:0] shadow [NREG];
  int checks = 0, failures = 0;

  ou_regfile #(.DATA_W(W), .NREG(NREG)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int r = 0; r < NREG; r++) begin
      checks++;
      if (rdata[r] !== shadow[r]) begin
        failures++;
        $display("FAIL %s r%0d: got %h expected %h", what, r, rdata[r], shadow[r]);
      end
    end
  endtask

  initial begin
    waddr = '0; wdata = '0;
    for (int r = 0; r < NREG; r++) shadow[r] = '0;
    #2 rst_n = 0;
    #10 rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom_range(0, 3) != 0);
      waddr = 3'($urandom);
      wdata = W'($urandom);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
