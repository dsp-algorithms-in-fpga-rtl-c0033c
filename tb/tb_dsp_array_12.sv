// tb_dsp_array_12: end-to-end test of the 12-channel build meant for small
// arrays (4 x 4 OUs, 8 direct neighbours and 4 at distance 2), running the
// neighbour exchange and the iterative square root of dsp_array_tb_core.
module tb_dsp_array_12;
  dsp_array_tb_core #(.N(4), .M(4), .LONG_LINKS(1'b0), .FIR_TEST(1'b0), .DEPTH(64),
                      .SET_PARAMS(1'b1)) core ();
endmodule
