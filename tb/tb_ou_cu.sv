// tb_ou_cu: self-checking test of the Control Unit on its own.
// The testbench plays the code memory (synchronous read of a small program)
// and the datapath: the result is the word's immediate, the divider is a
// model that is busy for 4 cycles. Availability on the waited channels, the
// output-busy signal and the divider are held back for a known number of
// cycles, so the test can check: the exact order of executed words (loop
// counter, BZ/BNEG/BPOS/BNZ/JMP/HALT), that acknowledges pulse only when a
// waited word executes and only on its channel, that one division is
// started, and the total cycle count (13 words + 17 stall cycles). A second
// start must run the program again from word 0.
module tb_ou_cu;
  import ou_pkg::*;
  import ou_asm_pkg::*;
  localparam int W = 16, NIN = 16, D = 16;

  logic clk = 0, rst_n = 0, start = 0;
  instr_t instr;
  logic [3:0] code_addr, cur;
  logic [NIN-1:0] nb_avail, ack_nb;
  logic ext_avail, out_busy, div_busy, div_done, res_z, res_n;
  logic [W-1:0] res;
  logic fire, ack_ext, div_start, div_clear, running, halted;
  instr_t prog [D];
  int checks = 0, failures = 0;
  int st, divc, n_exec, run_cycles, n_divstart, n_ack3, n_ackext;
  int exec_log [$];

  ou_cu #(.DATA_W(W), .NIN(NIN), .DEPTH(D), .HAS_DIV(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // code memory model and datapath model
  always_ff @(posedge clk) begin
    instr <= prog[code_addr];
    cur   <= code_addr;
  end
  assign res   = instr.imm;
  assign res_z = (res == '0);
  assign res_n = res[W-1];
  always_comb begin
    nb_avail    = '1;
    nb_avail[3] = (cur == 6) && (st >= 5);
    ext_avail   = (cur == 8) && (st >= 4);
    out_busy    = (cur == 9) && (st < 3);
  end
  assign div_busy = (divc > 0) && (divc <= 4);
  assign div_done = (divc > 4);

  always_ff @(posedge clk) begin
    if (!running || fire) st <= 0; else st <= st + 1;
    if (div_start)      divc <= 1;
    else if (div_clear) divc <= 0;
    else if (divc > 0)  divc <= divc + 1;
    if (running) run_cycles <= run_cycles + 1;
    if (fire) exec_log.push_back(int'(cur));
    if (div_start) n_divstart <= n_divstart + 1;
    if (ack_nb[3]) n_ack3 <= n_ack3 + 1;
    if (ack_ext)   n_ackext <= n_ackext + 1;
    // acknowledges only with an executing word, and only on waited channels
    if ((ack_nb != '0 || ack_ext) && !fire) begin
      failures++; $display("FAIL ack without fire");
    end
    if ((ack_nb & ~(NIN'(1) << 3)) != '0) begin
      failures++; $display("FAIL ack on a channel not waited for");
    end
    if (fire && instr.op == OP_DIV && !div_done) begin
      failures++; $display("FAIL division word executed before the divider finished");
    end
  end

  initial begin
    int expected [$] = '{0, 1, 1, 1, 1, 2, 4, 6, 8, 9, 10, 11, 13};
    for (int i = 0; i < D; i++) prog[i] = mk(.op(OP_NOP), .br(BR_HALT));
    prog[0]  = mk(.op(OP_PASS), .imm(3), .wlc(1));
    prog[1]  = mk(.op(OP_PASS), .imm(5), .br(BR_LOOP), .target(1));
    prog[2]  = mk(.op(OP_PASS), .imm(0), .br(BR_BZ), .target(4));
    prog[4]  = mk(.op(OP_PASS), .imm(-1), .br(BR_BNEG), .target(6));
    prog[6]  = mk(.op(OP_PASS), .a(NB(3)), .wa(1), .imm(1), .br(BR_BPOS), .target(8));
    prog[8]  = mk(.op(OP_PASS), .b(SRC_EXT), .wb(1), .imm(0), .br(BR_BNZ), .target(3));
    prog[9]  = mk(.op(OP_PASS), .wout(1), .pub(CH(0)), .imm(2));
    prog[10] = mk(.op(OP_DIV), .a(R(0)), .imm(7));
    prog[11] = mk(.op(OP_PASS), .imm(9), .br(BR_JMP), .target(13));
    st = 0; divc = 0; run_cycles = 0; n_divstart = 0; n_ack3 = 0; n_ackext = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle after reset", !running && !halted);
    start = 1; @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    check($sformatf("executed %0d words, expected %0d", exec_log.size(), expected.size()),
          exec_log.size() == expected.size());
    for (int i = 0; i < expected.size() && i < exec_log.size(); i++)
      check($sformatf("word %0d executed %0d expected %0d", i, exec_log[i], expected[i]),
            exec_log[i] == expected[i]);
    check($sformatf("run cycles %0d expected 30", run_cycles), run_cycles == 30);
    check("one division started", n_divstart == 1);
    check("one acknowledge on channel 3", n_ack3 == 1);
    check("one external acknowledge", n_ackext == 1);
    // restart
    exec_log.delete();
    start = 1; @(negedge clk); start = 0;
    check("running after restart", running);
    while (!halted) @(negedge clk);
    check("restart from word 0", exec_log.size() == expected.size() && exec_log[0] == 0);
    repeat (3) @(negedge clk);
    check("stays halted", halted && !running);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
