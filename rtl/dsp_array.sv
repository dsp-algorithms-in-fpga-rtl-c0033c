// dsp_array: the reconfigurable DSP architecture, an N x M matrix of
// Operational Units (ou_unit) whose edges are joined into a torus.
//
// Every OU runs its own microcode, so all units work in parallel and each
// can be reused for different steps of an algorithm. Operand input channel
// k of the OU at column n, row m is wired to the output register of the OU
// at ((n + NB_DN[k]) mod N, (m + NB_DM[k]) mod M):
//   LONG_LINKS = 1  16 channels: the 8 direct neighbours, the 4 units two
//                   away along the row and column, and the 4 units four
//                   away (16-input multiplexers; the main configuration);
//   LONG_LINKS = 0  12 channels: the 8 direct neighbours and the 4 units two
//                   away (12-input multiplexers, for smaller arrays).
// Each channel also carries the "data available" bit from producer to
// consumer and the "data read acknowledge" bit back, so units synchronise
// without a global schedule. Data between distant units is relayed by
// intermediate units under program control.
//
// Host side (this design's own choice; the architecture does not define
// it): a programming port writes microcode word `prog_data` at `prog_addr`
// of OU `prog_ou` (flat index m*N + n); `start` starts every CU at word 0;
// each OU has one external input stream and one external output stream
// with the same available/acknowledge handshake, and reports halted.
//
// Build options: CODE_RAM selects RAM (loadable) or ROM code memories, the
// ROM contents coming from the hex image ROM_FILE holding DEPTH words per OU
// in flat-index order; IN_MASK removes unused neighbour inputs; OUs at
// columns and rows that are multiples of DIV_STRIDE carry a divider.
// The array size, data width, code depth and divider placement are not
// fixed by the architecture; the defaults are this design's choice.
module dsp_array
  import ou_pkg::*;
#(
  parameter int          N          = 8,
  parameter int          M          = 8,
  parameter int          DATA_W     = 16,
  parameter bit          LONG_LINKS = 1'b1,
  parameter int          NREG       = 8,
  parameter int          DEPTH      = 256,
  parameter int          DIV_STRIDE = 2,
  parameter bit          CODE_RAM   = 1'b1,
  parameter string       ROM_FILE   = "",
  parameter logic [15:0] IN_MASK    = 16'hFFFF,
  localparam int         NOU        = N * M,
  localparam int         NIN        = LONG_LINKS ? 16 : 12,
  localparam int         OW         = (NOU > 1) ? $clog2(NOU) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     prog_we,
  input  logic [OW-1:0]            prog_ou,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [INSTR_W-1:0]       prog_data,
  input  logic [DATA_W-1:0]        ext_in_data   [NOU],
  input  logic [NOU-1:0]           ext_in_avail,
  output logic [NOU-1:0]           ext_in_ack,
  output logic [DATA_W-1:0]        ext_out_data  [NOU],
  output logic [NOU-1:0]           ext_out_avail,
  input  logic [NOU-1:0]           ext_out_ack,
  output logic [NOU-1:0]           halted,
  output logic [NOU-1:0]           running
);
  logic [DATA_W-1:0] out_data  [NOU];
  logic [NIN-1:0]    out_avail [NOU];
  logic [NIN-1:0]    out_ack   [NOU];
  logic [DATA_W-1:0] nb_data   [NOU][NIN];
  logic [NIN-1:0]    nb_avail  [NOU];
  logic [NIN-1:0]    nb_ack    [NOU];

  for (genvar m = 0; m < M; m++) begin : g_row
    for (genvar n = 0; n < N; n++) begin : g_col
      localparam int IDX = m * N + n;

      // Torus wiring: input k comes from the producer at +offset; this
      // unit's channel k output goes to the consumer at -offset.
      for (genvar k = 0; k < NIN; k++) begin : g_ch
        localparam int SRC = wrap(m + NB_DM[k], M) * N + wrap(n + NB_DN[k], N);
        localparam int DST = wrap(m - NB_DM[k], M) * N + wrap(n - NB_DN[k], N);
        assign nb_data[IDX][k]  = out_data[SRC];
        assign nb_avail[IDX][k] = out_avail[SRC][k];
        assign out_ack[IDX][k]  = nb_ack[DST][k];
      end

      ou_unit #(
        .DATA_W(DATA_W), .NIN(NIN), .NREG(NREG), .DEPTH(DEPTH),
        .HAS_DIV((n % DIV_STRIDE == 0) && (m % DIV_STRIDE == 0)),
        .CODE_RAM(CODE_RAM), .IN_MASK(IN_MASK), .INIT_FILE(ROM_FILE),
        .IMG_WORDS(NOU * DEPTH), .BASE(IDX * DEPTH)
      ) u_ou (
        .clk, .rst_n, .start,
        .prog_we(prog_we && prog_ou == OW'(IDX)), .prog_addr, .prog_data,
        .nb_data(nb_data[IDX]), .nb_avail(nb_avail[IDX]), .nb_ack(nb_ack[IDX]),
        .out_data(out_data[IDX]), .out_avail(out_avail[IDX]), .out_ack(out_ack[IDX]),
        .ext_in_data(ext_in_data[IDX]), .ext_in_avail(ext_in_avail[IDX]),
        .ext_in_ack(ext_in_ack[IDX]),
        .ext_out_avail(ext_out_avail[IDX]), .ext_out_ack(ext_out_ack[IDX]),
        .running(running[IDX]), .halted(halted[IDX])
      );

      assign ext_out_data[IDX] = out_data[IDX];
    end
  end

endmodule
