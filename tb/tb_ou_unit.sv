// tb_ou_unit: self-checking test of one Operational Unit with its
// neighbours and host modelled by the testbench.
// The OU's code memory is loaded through the programming port with a loop
// that, for each of K iterations: takes x from the external input and y
// from neighbour channel 5 (both waited for and acknowledged), forms
// 0.5*x + 0.25*y with MACZ/MAC in Q15, divides it by 3 on the divider,
// announces the quotient to neighbour channel 2 and the host, then
// announces quotient+1 (read back from its own output register) to the
// host. Producers and consumers in the testbench answer after random
// delays, so the OU must stall both for data and for acknowledges. The
// testbench checks every delivered value against its own arithmetic, that
// each value reaches each consumer exactly once, that acknowledges appear
// only on channel 5 and the external port, and that the OU halts.
module tb_ou_unit;
  import ou_pkg::*;
  import ou_asm_pkg::*;
  localparam int W = 16, NIN = 16, D = 16, K = 40;

  logic clk = 0, rst_n = 0, start = 0;
  logic prog_we = 0;
  logic [3:0] prog_addr;
  logic [INSTR_W-1:0] prog_data;
  logic [W-1:0] nb_data [NIN];
  logic [NIN-1:0] nb_avail, nb_ack, out_avail, out_ack;
  logic [W-1:0] out_data, ext_in_data;
  logic ext_in_avail, ext_in_ack, ext_out_avail, ext_out_ack, running, halted;
  int checks = 0, failures = 0;

  ou_unit #(.DATA_W(W), .NIN(NIN), .DEPTH(D), .HAS_DIV(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
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

  logic [W-1:0] xs [K], ys [K], q_ref [K];
  int ix, iy, ich2, iext, stall_data, stall_out;

  // producers: external input and neighbour channel 5, random gaps
  always_ff @(posedge clk) if (rst_n) begin
    if (ext_in_ack) ix <= ix + 1;
    if (nb_ack[5])  iy <= iy + 1;
    if ((nb_ack & ~(NIN'(1) << 5)) != '0) begin
      failures++; $display("FAIL acknowledge on a channel that was not read");
    end
    if (running && !dut.fire && dut.u_cu.operands_ok == 1'b0) stall_data <= stall_data + 1;
    if (running && !dut.fire && dut.u_cu.out_ok == 1'b0)      stall_out  <= stall_out + 1;
  end
  logic gate_x, gate_y;
  always_ff @(posedge clk) begin
    gate_x <= ($urandom_range(0, 2) == 0);
    gate_y <= ($urandom_range(0, 3) == 0);
  end
  assign ext_in_data  = (ix < K) ? xs[ix] : '0;
  assign ext_in_avail = (ix < K) && gate_x;
  always_comb begin
    for (int k = 0; k < NIN; k++) nb_data[k] = W'(16'hdead + k);
    nb_data[5] = (iy < K) ? ys[iy] : '0;
    nb_avail    = '0;
    nb_avail[5] = (iy < K) && gate_y;
  end

  // consumers: neighbour channel 2 and the host, random acknowledge delays
  logic ack2_go, ackx_go;
  always_ff @(posedge clk) begin
    ack2_go <= ($urandom_range(0, 4) == 0);
    ackx_go <= ($urandom_range(0, 2) == 0);
  end
  always_comb begin
    out_ack    = '0;
    out_ack[2] = out_avail[2] && ack2_go;
    ext_out_ack = ext_out_avail && ackx_go;
  end
  always_ff @(posedge clk) if (rst_n) begin
    if (out_ack[2]) begin
      check($sformatf("channel 2 value %0d", ich2), out_data, q_ref[ich2]);
      ich2 <= ich2 + 1;
    end
    if (ext_out_ack) begin
      check($sformatf("host value %0d", iext), out_data,
            (iext % 2 == 0) ? q_ref[iext/2] : q_ref[iext/2] + 1'b1);
      iext <= iext + 1;
    end
    if (out_avail[NIN-1:3] != '0 || out_avail[1:0] != '0) begin
      failures++; $display("FAIL announced on a channel not in the mask");
    end
  end

  instr_t prog [D];
  initial begin
    longint acc;
    int r2;
    ix = 0; iy = 0; ich2 = 0; iext = 0; stall_data = 0; stall_out = 0;
    for (int i = 0; i < K; i++) begin
      xs[i] = W'($urandom); ys[i] = W'($urandom);
      acc = longint'(signed'(xs[i])) * 16384 + longint'(signed'(ys[i])) * 8192;
      r2 = int'(signed'(W'(acc >>> 15)));
      q_ref[i] = W'(r2 / 3);
    end
    for (int i = 0; i < D; i++) prog[i] = mk(.op(OP_NOP), .br(BR_HALT));
    prog[0] = mk(.op(OP_PASS), .imm(K - 1), .wlc(1));
    prog[1] = mk(.op(OP_PASS), .a(SRC_EXT), .wa(1), .wreg(1), .rd(0));
    prog[2] = mk(.op(OP_PASS), .a(NB(5)), .wa(1), .wreg(1), .rd(1));
    prog[3] = mk(.op(OP_MACZ), .a(R(0)), .b(SRC_IMM), .imm(16'h4000));
    prog[4] = mk(.op(OP_MAC),  .a(R(1)), .b(SRC_IMM), .imm(16'h2000), .wreg(1), .rd(2));
    prog[5] = mk(.op(OP_DIV),  .a(R(2)), .b(SRC_IMM), .imm(3), .wout(1), .pub(CH(2) | CH(EXT_CH)));
    prog[6] = mk(.op(OP_ADD),  .a(SRC_OWN), .b(SRC_IMM), .imm(1), .wout(1), .pub(CH(EXT_CH)),
                 .br(BR_LOOP), .target(1));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 4'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    start = 1; @(negedge clk); start = 0;
    while (!halted) @(negedge clk);
    repeat (30) @(negedge clk);   // let the last values drain
    checks++;
    if (ix != K || iy != K || ich2 != K || iext != 2*K) begin
      failures++;
      $display("FAIL counts: x %0d y %0d ch2 %0d host %0d", ix, iy, ich2, iext);
    end
    checks++;
    if (stall_data == 0 || stall_out == 0) begin
      failures++; $display("FAIL stalls not exercised: data %0d out %0d", stall_data, stall_out);
    end
    $display("stalls: waiting for data %0d cycles, waiting for acknowledges %0d cycles",
             stall_data, stall_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
