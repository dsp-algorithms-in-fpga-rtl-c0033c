// tb_dsp_array: end-to-end test of the array in its default build (8 x 8
// OUs, 16 channels per input multiplexer, 256-word code memories), running
// the neighbour exchange, the distributed FIR filter and the iterative
// square root of dsp_array_tb_core.
module tb_dsp_array;
  dsp_array_tb_core #(.N(8), .M(8), .LONG_LINKS(1'b1), .FIR_TEST(1'b1), .SET_PARAMS(1'b0)) core ();
endmodule
