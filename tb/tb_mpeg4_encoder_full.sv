// tb_mpeg4_encoder_full: the end-to-end test at the encoder's default size,
// a 352x288 (CIF) picture of 396 macroblocks: one I frame and three P frames
// with every parameter of the encoder top at its default. The environment
// and its checks are in tb_mpeg4_encoder_env.
//
// The CIF size is the design's main configuration. The frame count is the
// test's own.
module tb_mpeg4_encoder_full;
  tb_mpeg4_encoder_env #(.FULL(1'b1), .W(352), .H(288), .NFRAMES(4)) env ();
endmodule
