// tb_ou_code_mem: self-checking test of the code memory in both build forms.
// RAM form: random writes through the programming port, then reads whose
// data must appear exactly one clock after the address. ROM form: contents
// come from tb/rom_image.hex, whose word i is ((i+1) * 0x123456789ABCDEF01)
// mod 2^66; the instance takes words 16..31 (BASE = 16) and must ignore
// writes.
module tb_ou_code_mem;
  localparam int W = 66, D = 16;
  logic clk = 0, we = 0;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, rdata_rom;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  ou_code_mem #(.WIDTH(W), .DEPTH(D), .CODE_RAM(1'b1)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr, .rdata);
  ou_code_mem #(.WIDTH(W), .DEPTH(D), .CODE_RAM(1'b0),
                .INIT_FILE("tb/rom_image.hex"), .IMG_WORDS(32), .BASE(16)) u_rom (
    .clk, .we, .waddr, .wdata, .raddr, .rdata(rdata_rom));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rom_word(int i);
    logic [W-1:0] k;
    k = 66'h1_2345_6789_ABCD_EF01;
    return W'(W'(i + 1) * k);
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    raddr = '0; waddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 4'(i); wdata = {W'($urandom), 32'($urandom)};
      shadow[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, D-1);
      raddr = 4'(a);
      // a write in the same cycle to another word must not disturb the read
      we = 1; waddr = 4'(a + 1); wdata = {W'($urandom), 32'($urandom)};
      @(posedge clk);
      shadow[waddr] = wdata;
      #1;
      check($sformatf("ram[%0d]", a), rdata, shadow[a]);
      check($sformatf("rom[%0d]", a), rdata_rom, rom_word(16 + a));
      @(negedge clk);
      raddr = 4'(a + 2);   // changing the address alone must not change rdata
      #1;
      check("sync read", rdata, shadow[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
