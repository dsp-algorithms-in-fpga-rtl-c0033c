// tb_dsp_array_rom: end-to-end test of the ROM ("fixed code") build.
// A 4 x 4 array with 12 channels and 32-word code ROMs is built with
// CODE_RAM = 0; its code comes from tb/array_rom.hex and nothing is written
// through the programming port. The image holds, for OU i (32 words each,
// in flat-index order), the neighbour-exchange program: announce i*7+1 on
// all 12 channels, read and sum the 12 neighbour values (waiting for each),
// report the sum to the host twice, halt. The testbench checks both reports
// of every OU against the sum over the 8 direct neighbours and the 4 at
// distance 2 on the torus, and that every OU halts.
module tb_dsp_array_rom;
  import ou_pkg::*;
  localparam int N = 4, M = 4, NOU = N * M, W = 16, DEPTH = 32;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] prog_ou = '0;
  logic [4:0] prog_addr = '0;
  logic [INSTR_W-1:0] prog_data = '0;
  logic prog_we = 1'b0;
  logic [W-1:0] ext_in_data [NOU];
  logic [NOU-1:0] ext_in_avail = '0, ext_out_ack = '0;
  logic [NOU-1:0] ext_in_ack, ext_out_avail, halted, running;
  logic [W-1:0] ext_out_data [NOU];
  int checks = 0, failures = 0;

  dsp_array #(.N(N), .M(M), .LONG_LINKS(1'b0), .DEPTH(DEPTH), .CODE_RAM(1'b0),
              .ROM_FILE("tb/array_rom.hex")) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] got [NOU][$];
  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < NOU; i++)
        if (ext_out_avail[i] && ext_out_ack[i]) got[i].push_back(ext_out_data[i]);
  always @(negedge clk)
    for (int i = 0; i < NOU; i++) ext_out_ack[i] = ext_out_avail[i] && ($urandom_range(0, 2) == 0);

  int dn [12] = '{ 1, -1, 0,  0, 1, -1,  1, -1,  2, -2, 0,  0};
  int dm [12] = '{ 0,  0, 1, -1, 1, -1, -1,  1,  0,  0, 2, -2};

  initial begin
    for (int i = 0; i < NOU; i++) ext_in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (halted != '1) @(negedge clk);
    while (ext_out_avail != '0) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++) begin
        int i;
        logic [W-1:0] sum;
        i = m * N + n;
        sum = '0;
        for (int k = 0; k < 12; k++)
          sum += W'((((m + dm[k]) % M + M) % M * N + ((n + dn[k]) % N + N) % N) * 7 + 1);
        checks++;
        if (got[i].size() != 2) begin
          failures++; $display("FAIL OU(%0d,%0d) reported %0d values", n, m, got[i].size());
        end
        foreach (got[i][j]) begin
          checks++;
          if (got[i][j] != sum) begin
            failures++; $display("FAIL OU(%0d,%0d) sum %h expected %h", n, m, got[i][j], sum);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
