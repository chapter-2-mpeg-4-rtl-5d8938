// tb_mpeg4_encoder: end-to-end test of the encoder on a small 64x48 picture
// (12 macroblocks), one I frame followed by three P frames. The environment and
// its checks are in tb_mpeg4_encoder_env.
//
// The frame sizes and the frame count are the test's own, chosen to keep it
// short.
module tb_mpeg4_encoder;
  tb_mpeg4_encoder_env #(.FULL(1'b0), .W(64), .H(48), .NFRAMES(4)) env ();
endmodule
