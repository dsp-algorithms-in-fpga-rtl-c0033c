// ou_in_mux: the multiplexer in front of each input of the arithmetical
// module. It picks, with the 5-bit source code of the current microcode
// word, one of:
//   0..NIN-1   the output register of neighbour channel k (torus wiring),
//   16..23     local register r0..r7,
//   24         the external input port,
//   25         the sign-extended immediate of the microcode word,
//   26         the OU's own output register.
// Any other code gives zero. The multiplexer is purely combinational.
//
// IN_MASK removes neighbour inputs at synthesis time: a channel whose bit
// is 0 is never selected (it reads as zero), so its wiring and mux leg are
// optimised away. This is the "partially fixed" build of the architecture
// for a known, fixed set of programs. The neighbour legs follow the
// architecture; the local, external, immediate and own-output legs are
// this design's own choice.
module ou_in_mux
  import ou_pkg::*;
#(
  parameter int          DATA_W  = 16,
  parameter int          NIN     = 16,
  parameter int          NREG    = 8,
  parameter logic [15:0] IN_MASK = 16'hFFFF
) (
  input  logic [4:0]        sel,
  input  logic [DATA_W-1:0] nb   [NIN],
  input  logic [DATA_W-1:0] regs [NREG],
  input  logic [DATA_W-1:0] ext,
  input  logic [IMM_W-1:0]  imm,
  input  logic [DATA_W-1:0] own,
  output logic [DATA_W-1:0] y
);
  logic [DATA_W-1:0] imm_x;
  assign imm_x = DATA_W'(signed'(imm));

  always_comb begin
    y = '0;
    if (sel < 5'(NIN)) begin
      for (int k = 0; k < NIN; k++)
        if (IN_MASK[k] && sel == 5'(k)) y = nb[k];
    end else if (sel >= SRC_R0 && sel < SRC_R0 + 5'(NREG)) begin
      for (int r = 0; r < NREG; r++)
        if (sel == SRC_R0 + 5'(r)) y = regs[r];
    end else if (sel == SRC_EXT) begin
      y = ext;
    end else if (sel == SRC_IMM) begin
      y = imm_x;
    end else if (sel == SRC_OWN) begin
      y = own;
    end
  end

endmodule
