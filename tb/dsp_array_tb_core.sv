// dsp_array_tb_core: end-to-end test of the OU array, shared by the
// testbenches of the 16-channel and 12-channel builds.
//
// The host side is modelled here: programs are written into every OU's code
// memory through the programming port, the external input ports are fed
// from per-OU queues and the external output ports are drained with random
// acknowledge delays. Three workloads run:
//
//  A  Neighbour exchange: every OU announces a value of its own on all its
//     channels, then reads each of its NIN inputs (waiting for "data
//     available" and acknowledging) and sums them. The sum each OU reports
//     twice in a row (the second report must wait for the host's
//     acknowledge of the first) and is checked against neighbour offsets
//     written out here from the architecture (8 direct, 4 at distance 2,
//     and with 16 channels 4 at distance 4), wrapped around the torus.
//  B  (16-channel build only) A 5-tap FIR filter spread over five OUs in a
//     chain whose links are 1, 2 and 4 units long, with one OU used purely
//     as a relay and a link that wraps around the torus edge. Each stage
//     receives the delayed sample and the partial sum, adds its Q15 tap
//     product and passes both on. Output samples are checked against a
//     direct-form reference.
//  C  Integer square root by Newton iteration (x <- (x + N/x)/2 until it
//     stops decreasing) on an OU with a divider. The number of iterations,
//     hence the time per result, depends on the data.
//
// Each mechanism the design has is counted and must occur at least once:
// transfers on every channel, consumer stalls for data, producer stalls for
// acknowledges, divisions, loop and conditional branches, relaying,
// wrap-around links, host handshakes, halt and restart with new code.
module dsp_array_tb_core #(
  parameter int N          = 8,
  parameter int M          = 8,
  parameter bit LONG_LINKS = 1'b1,
  parameter bit FIR_TEST   = 1'b1,
  parameter int DEPTH      = 256,
  parameter bit SET_PARAMS = 1'b0
);
  import ou_pkg::*;
  import ou_asm_pkg::*;
  localparam int W   = 16;
  localparam int NOU = N * M;
  localparam int NIN = LONG_LINKS ? 16 : 12;
  localparam int OW  = (NOU > 1) ? $clog2(NOU) : 1;
  localparam int AW  = $clog2(DEPTH);
  localparam int KF  = 24;   // FIR samples
  localparam int KS  = 16;   // square roots

  logic clk = 0, rst_n = 0, start = 0, prog_we = 0;
  logic [OW-1:0] prog_ou;
  logic [AW-1:0] prog_addr;
  logic [INSTR_W-1:0] prog_data;
  logic [W-1:0] ext_in_data [NOU];
  logic [NOU-1:0] ext_in_avail = '0, ext_out_ack = '0;
  logic [NOU-1:0] ext_in_ack, ext_out_avail, halted, running;
  logic [W-1:0] ext_out_data [NOU];

  if (SET_PARAMS) begin : g_dut_small
    dsp_array #(.N(N), .M(M), .LONG_LINKS(LONG_LINKS), .DEPTH(DEPTH)) dut (.*);
  end else begin : g_dut_default
    dsp_array dut (.*);
  end

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- host model ----------------
  logic [W-1:0] in_q  [NOU][$];
  logic [W-1:0] out_q [NOU][$];
  int out_cyc [NOU][$];
  int cycle = 0;
  int n_host_in = 0, n_host_out = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int i = 0; i < NOU; i++) begin
      if (rst_n && ext_in_ack[i] && ext_in_avail[i]) begin
        void'(in_q[i].pop_front());
        n_host_in++;
      end
      if (rst_n && ext_out_ack[i] && ext_out_avail[i]) begin
        out_q[i].push_back(ext_out_data[i]);
        out_cyc[i].push_back(cycle);
        n_host_out++;
      end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < NOU; i++) begin
      ext_in_avail[i] = (in_q[i].size() > 0) && ($urandom_range(0, 2) != 0);
      ext_in_data[i]  = (in_q[i].size() > 0) ? in_q[i][0] : '0;
      ext_out_ack[i]  = ext_out_avail[i] && ($urandom_range(0, 3) != 0);
    end
  end

  // ---------------- mechanism monitors ----------------
  logic [NOU-1:0] v_fire, v_stall_data, v_stall_out, v_div, v_loop, v_cond;
  logic [NIN-1:0] v_ack [NOU];
  for (genvar m = 0; m < M; m++) begin : g_mr
    for (genvar n = 0; n < N; n++) begin : g_mc
      localparam int I = m * N + n;
      if (SET_PARAMS) begin : g_s
        assign v_fire[I]       = g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.fire;
        assign v_stall_data[I] = g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.running &&
                                 !g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.operands_ok;
        assign v_stall_out[I]  = g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.running &&
                                 !g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.out_ok;
        assign v_div[I]        = g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.div_start;
        assign v_loop[I]       = v_fire[I] && g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.taken &&
                                 g_dut_small.dut.g_row[m].g_col[n].u_ou.instr.br == BR_LOOP;
        assign v_cond[I]       = v_fire[I] && g_dut_small.dut.g_row[m].g_col[n].u_ou.u_cu.taken &&
                                 g_dut_small.dut.g_row[m].g_col[n].u_ou.instr.br inside {BR_BZ, BR_BNZ, BR_BNEG, BR_BPOS};
        assign v_ack[I]        = g_dut_small.dut.nb_ack[I];
      end else begin : g_d
        assign v_fire[I]       = g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.fire;
        assign v_stall_data[I] = g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.running &&
                                 !g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.operands_ok;
        assign v_stall_out[I]  = g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.running &&
                                 !g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.out_ok;
        assign v_div[I]        = g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.div_start;
        assign v_loop[I]       = v_fire[I] && g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.taken &&
                                 g_dut_default.dut.g_row[m].g_col[n].u_ou.instr.br == BR_LOOP;
        assign v_cond[I]       = v_fire[I] && g_dut_default.dut.g_row[m].g_col[n].u_ou.u_cu.taken &&
                                 g_dut_default.dut.g_row[m].g_col[n].u_ou.instr.br inside {BR_BZ, BR_BNZ, BR_BNEG, BR_BPOS};
        assign v_ack[I]        = g_dut_default.dut.nb_ack[I];
      end
    end
  end

  int n_stall_data = 0, n_stall_out = 0, n_div = 0, n_loop = 0, n_cond = 0, n_words = 0;
  int n_ch [16];
  initial for (int k = 0; k < 16; k++) n_ch[k] = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall_data += $countones(v_stall_data);
    n_stall_out  += $countones(v_stall_out);
    n_div        += $countones(v_div);
    n_loop       += $countones(v_loop);
    n_cond       += $countones(v_cond);
    n_words      += $countones(v_fire);
    for (int i = 0; i < NOU; i++)
      for (int k = 0; k < NIN; k++)
        if (v_ack[i][k]) n_ch[k]++;
  end

  // ---------------- program loading ----------------
  instr_t prog [NOU][$];

  task automatic load_and_run(string name);
    int t0;
    for (int i = 0; i < NOU; i++) begin
      if (prog[i].size() == 0) prog[i].push_back(mk(.op(OP_NOP), .br(BR_HALT)));
      for (int a = 0; a < prog[i].size(); a++) begin
        @(negedge clk);
        prog_we = 1; prog_ou = OW'(i); prog_addr = AW'(a); prog_data = prog[i][a];
      end
    end
    @(negedge clk);
    prog_we = 0;
    start = 1; @(negedge clk); start = 0;
    t0 = cycle;
    while (halted != '1) @(negedge clk);
    while (ext_out_avail != '0) @(negedge clk);
    repeat (4) @(negedge clk);
    $display("%s: ran %0d cycles", name, cycle - t0);
    for (int i = 0; i < NOU; i++) prog[i].delete();
  endtask

  function automatic int wrapi(int v, int s);
    return ((v % s) + s) % s;
  endfunction

  // ---------------- workloads ----------------
  int dn [16] = '{ 1, -1, 0,  0, 1, -1,  1, -1,  2, -2, 0,  0,  4, -4, 0,  0};
  int dm [16] = '{ 0,  0, 1, -1, 1, -1, -1,  1,  0,  0, 2, -2,  0,  0, 4, -4};

  function automatic logic [W-1:0] val_a(int i);
    return W'(i * 7 + 1);
  endfunction

  task automatic workload_a();
    logic [NPORT-1:0] all_ch;
    all_ch = '0;
    for (int k = 0; k < NIN; k++) all_ch[k] = 1'b1;
    for (int i = 0; i < NOU; i++) begin
      prog[i].push_back(mk(.op(OP_PASS), .imm(int'(val_a(i))), .wout(1), .pub(all_ch)));
      prog[i].push_back(mk(.op(OP_PASS), .a(NB(0)), .wa(1), .wreg(1), .rd(0)));
      for (int k = 1; k < NIN; k++)
        prog[i].push_back(mk(.op(OP_ADD), .a(R(0)), .b(NB(k)), .wb(1), .wreg(1), .rd(0)));
      prog[i].push_back(mk(.op(OP_PASS), .a(R(0)), .wout(1), .pub(CH(EXT_CH))));
      // second report right away: must wait for the host to take the first
      prog[i].push_back(mk(.op(OP_PASS), .a(R(0)), .wout(1), .pub(CH(EXT_CH)), .br(BR_HALT)));
    end
    load_and_run("A neighbour exchange");
    for (int m = 0; m < M; m++)
      for (int n = 0; n < N; n++) begin
        int i;
        logic [W-1:0] sum;
        i = m * N + n;
        sum = '0;
        for (int k = 0; k < NIN; k++)
          sum += val_a(wrapi(m + dm[k], M) * N + wrapi(n + dn[k], N));
        check($sformatf("A: OU(%0d,%0d) reported %0d values", n, m, out_q[i].size()),
              out_q[i].size() == 2);
        foreach (out_q[i][j])
          check($sformatf("A: OU(%0d,%0d) sum %h expected %h", n, m, out_q[i][j], sum),
                out_q[i][j] == sum);
        out_q[i].delete(); out_cyc[i].delete();
      end
  endtask

  // FIR chain: stage positions and the channel each stage reads from.
  int fir_n [5] = '{0, 1, 3, 7, 0};
  int fir_m [5] = '{0, 0, 0, 0, 2};
  int fir_in_ch [5] = '{-1, 1, 9, 13, 5};      // stage 4 reads the relay
  int fir_out_ch [5] = '{1, 9, 13, 3, EXT_CH}; // stage 3 feeds the relay
  int fir_h [5] = '{8192, 4096, -2048, 12288, 1024};   // Q15 taps
  localparam int RELAY = 1 * N + 7;            // OU(7,1), reads channel 3, feeds channel 5

  task automatic workload_b();
    logic [W-1:0] xs [KF];
    for (int s = 0; s < 5; s++) begin
      int i;
      i = fir_m[s] * N + fir_n[s];
      prog[i].push_back(mk(.op(OP_PASS), .imm(KF - 1), .wlc(1)));
      prog[i].push_back(mk(.op(OP_PASS), .imm(0), .wreg(1), .rd(2)));
      if (s == 0) begin
        prog[i].push_back(mk(.op(OP_PASS), .a(SRC_EXT), .wa(1), .wreg(1), .rd(0)));
        prog[i].push_back(mk(.op(OP_PASS), .imm(0), .wreg(1), .rd(1)));
      end else begin
        prog[i].push_back(mk(.op(OP_PASS), .a(NB(fir_in_ch[s])), .wa(1), .wreg(1), .rd(0)));
        prog[i].push_back(mk(.op(OP_PASS), .a(NB(fir_in_ch[s])), .wa(1), .wreg(1), .rd(1)));
      end
      prog[i].push_back(mk(.op(OP_MULQ), .a(R(0)), .imm(fir_h[s]), .wreg(1), .rd(3)));
      prog[i].push_back(mk(.op(OP_ADD), .a(R(1)), .b(R(3)), .wreg(1), .rd(1)));
      if (s < 4) prog[i].push_back(mk(.op(OP_PASS), .a(R(2)), .wout(1), .pub(CH(fir_out_ch[s]))));
      else       prog[i].push_back(mk(.op(OP_NOP)));
      prog[i].push_back(mk(.op(OP_PASS), .a(R(1)), .wout(1), .pub(CH(fir_out_ch[s]))));
      prog[i].push_back(mk(.op(OP_PASS), .a(R(0)), .wreg(1), .rd(2), .br(BR_LOOP), .target(2)));
      prog[i].push_back(mk(.op(OP_NOP), .br(BR_HALT)));
    end
    prog[RELAY].push_back(mk(.op(OP_PASS), .imm(2 * KF - 1), .wlc(1)));
    prog[RELAY].push_back(mk(.op(OP_PASS), .a(NB(3)), .wa(1), .wout(1), .pub(CH(5)),
                             .br(BR_LOOP), .target(1)));
    prog[RELAY].push_back(mk(.op(OP_NOP), .br(BR_HALT)));
    for (int t = 0; t < KF; t++) begin
      xs[t] = W'($urandom);
      in_q[0].push_back(xs[t]);
    end
    workload_c_program();
    load_and_run("B FIR filter + C square root");
    begin
      int o;
      o = fir_m[4] * N + fir_n[4];
      check($sformatf("B: %0d output samples", out_q[o].size()), out_q[o].size() == KF);
      for (int t = 0; t < KF && t < out_q[o].size(); t++) begin
        logic [W-1:0] y;
        y = '0;
        for (int s = 0; s < 5; s++)
          if (t - s >= 0)
            y += W'((longint'(signed'(xs[t - s])) * longint'(fir_h[s])) >>> 15);
        check($sformatf("B: y[%0d] = %h expected %h", t, out_q[o][t], y), out_q[o][t] == y);
      end
      out_q[o].delete(); out_cyc[o].delete();
    end
  endtask

  localparam int SQ = (2 % M) * N + (2 % N);   // OU(2,2), which has a divider
  int sq_in [KS];

  task automatic workload_c_program();
    prog[SQ].push_back(mk(.op(OP_PASS), .imm(KS - 1), .wlc(1)));                       // 0
    prog[SQ].push_back(mk(.op(OP_PASS), .a(SRC_EXT), .wa(1), .wreg(1), .rd(0)));       // 1
    prog[SQ].push_back(mk(.op(OP_PASS), .a(R(0)), .wreg(1), .rd(1)));                  // 2
    prog[SQ].push_back(mk(.op(OP_DIV), .a(R(0)), .b(R(1)), .wreg(1), .rd(2)));         // 3
    prog[SQ].push_back(mk(.op(OP_ADD), .a(R(2)), .b(R(1)), .wreg(1), .rd(2)));         // 4
    prog[SQ].push_back(mk(.op(OP_SRA), .a(R(2)), .imm(1), .wreg(1), .rd(2)));          // 5
    prog[SQ].push_back(mk(.op(OP_SUB), .a(R(2)), .b(R(1)), .br(BR_BNEG), .target(9))); // 6
    prog[SQ].push_back(mk(.op(OP_PASS), .a(R(1)), .wout(1), .pub(CH(EXT_CH)),
                          .br(BR_LOOP), .target(1)));                                 // 7
    prog[SQ].push_back(mk(.op(OP_NOP), .br(BR_HALT)));                                 // 8
    prog[SQ].push_back(mk(.op(OP_PASS), .a(R(2)), .wreg(1), .rd(1), .br(BR_JMP), .target(3))); // 9
    for (int j = 0; j < KS; j++) begin
      sq_in[j] = (j == 0) ? 1 : (j == 1) ? 2 : (j == 2) ? 16383 : $urandom_range(3, 16383);
      in_q[SQ].push_back(W'(sq_in[j]));
    end
  endtask

  task automatic workload_c_check();
    int lat [$];
    int distinct;
    check($sformatf("C: %0d square roots", out_q[SQ].size()), out_q[SQ].size() == KS);
    for (int j = 0; j < KS && j < out_q[SQ].size(); j++) begin
      int r;
      r = 0;
      while ((r + 1) * (r + 1) <= sq_in[j]) r++;
      check($sformatf("C: isqrt(%0d) = %0d expected %0d", sq_in[j], out_q[SQ][j], r),
            int'(out_q[SQ][j]) == r);
      if (j > 0) lat.push_back(out_cyc[SQ][j] - out_cyc[SQ][j-1]);
    end
    distinct = 0;
    foreach (lat[j]) if (lat[j] != lat[0]) distinct = 1;
    check("C: time per result depends on the data", distinct == 1);
    out_q[SQ].delete(); out_cyc[SQ].delete();
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_restart;
    prog_ou = '0; prog_addr = '0; prog_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    workload_a();
    n_restart = 0;
    if (FIR_TEST) begin
      workload_b();
      n_restart++;
    end else begin
      workload_c_program();
      load_and_run("C square root");
      n_restart++;
    end
    workload_c_check();
    for (int i = 0; i < NOU; i++)
      check($sformatf("host queues of OU %0d empty", i), out_q[i].size() == 0 && in_q[i].size() == 0);
    $display("mechanisms: words %0d, data stalls %0d, acknowledge stalls %0d, divisions %0d, loop branches %0d, conditional branches %0d, host in %0d, host out %0d, restarts %0d",
             n_words, n_stall_data, n_stall_out, n_div, n_loop, n_cond, n_host_in, n_host_out, n_restart);
    for (int k = 0; k < NIN; k++)
      check($sformatf("transfers on channel %0d: %0d", k, n_ch[k]), n_ch[k] > 0);
    check("consumer stalled waiting for data", n_stall_data > 0);
    check("producer stalled waiting for acknowledges", n_stall_out > 0);
    check("multi-cycle division", n_div > 0);
    check("loop branch", n_loop > 0);
    check("conditional branch", n_cond > 0);
    check("host input handshake", n_host_in > 0);
    check("host output handshake", n_host_out > 0);
    check("restart with new code", n_restart > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
