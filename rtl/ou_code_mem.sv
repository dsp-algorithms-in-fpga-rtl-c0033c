// ou_code_mem: the code memory of one Control Unit.
//
// DEPTH microcode words of WIDTH bits with one synchronous read port: the
// word at `raddr` appears on `rdata` one clock later, as a block RAM gives
// it. The build option CODE_RAM chooses the two forms the architecture
// allows:
//   CODE_RAM = 1  RAM, written through the programming port (we, waddr,
//                 wdata) so the program can be changed at run time;
//                 contents start at zero.
//   CODE_RAM = 0  ROM, contents fixed at build time from the hex image
//                 INIT_FILE; the programming port is ignored. The image may
//                 hold the code of several OUs back to back: this memory
//                 takes words BASE .. BASE+DEPTH-1 of it.
// The port timing and the shared-image layout are this design's choice.
module ou_code_mem #(
  parameter int    WIDTH    = 66,
  parameter int    DEPTH    = 256,
  parameter bit    CODE_RAM = 1'b1,
  parameter string INIT_FILE = "",
  parameter int    IMG_WORDS = 256,
  parameter int    BASE      = 0
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  if (CODE_RAM) begin : g_ram
    initial begin
      for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    end
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end else begin : g_rom
    logic [WIDTH-1:0] img [IMG_WORDS];
    initial begin
      for (int i = 0; i < IMG_WORDS; i++) img[i] = '0;
      if (INIT_FILE != "") $readmemh(INIT_FILE, img);
      for (int i = 0; i < DEPTH; i++)
        mem[i] = (BASE + i < IMG_WORDS) ? img[BASE + i] : '0;
    end
    always_ff @(posedge clk) rdata <= mem[raddr];
  end

endmodule
