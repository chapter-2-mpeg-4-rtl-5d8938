// tb_encoder_ctrl: runs the frame controller with models of the units that
// answer each start with done after a random delay (ME is followed by the MC
// fetch). Frame sequence I, P, P, P, I, P with 12 macroblocks in rows of 4.
// Checks: every macroblock passes ME, MC, texture and VLC exactly once and in
// order; texture of MB k starts only after the MC of MB k is done (P) and VLC
// of MB k only after its texture is done; the ME position follows the
// macroblock raster; in a P frame downsampling comes before the first ME, in
// an I frame after the last VLC; the loop counts (I: N_MB passes through
// i_text_en; P: N_MB-2 returns from p_text_vlc_en to p_ME_text_en); one 0x03
// write to the DMAC per frame after the packer flush; the frame-memory role
// select is 0, 0, 1, 0 for I, P, P, P and 0 again after the next I.
//
// The state sequence and the loop counts follow the controller description.
// The unit models and their delays are the test's own.
module tb_encoder_ctrl;
  import mpeg4_pkg::*;
  localparam int N = 12, W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic frame_go = 1'b0;
  frame_type_e frame_type = FRAME_I;
  logic frame_busy, frame_done, vlc_init, mem_sel;
  logic dn_start, dn_done, me_start, me_done, mc_start, mc_done, mc_swap;
  logic [4:0] me_mb_x, me_mb_y;
  logic tex_start, tex_done, vlc_swap, vlc_start, vlc_done, vlc_flush, vlc_flush_done;
  logic [8:0] tex_mb, vlc_mb;
  logic dmac_wr;
  logic [7:0] dmac_data;
  logic [3:0] state_o;

  encoder_ctrl #(.N_MB(N), .MB_W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unit models: done after a random delay (state codes: 2 i_text_en,
  // 5 p_ME_text_en, 6 p_text_vlc_en)
  int me_cnt, mc_cnt, tex_cnt, vlc_cnt, dn_cnt, dmac_cnt, flush_cnt;
  int me_t, mc_t, tex_t, vlc_t, dn_t, fl_t;
  logic me_b, mc_b, tex_b, vlc_b, dn_b, fl_b;
  int me_done_n, mc_done_n, tex_done_n;   // macroblocks finished per stage
  int i_loops, p_loops, overlap;
  logic [3:0] prev_st;
  frame_type_e cur_type;
  int first_me_seen, dn_seen;

  always @(posedge clk) begin
    if (!rst_n) begin
      me_b <= 0; mc_b <= 0; tex_b <= 0; vlc_b <= 0; dn_b <= 0; fl_b <= 0;
      me_done <= 0; mc_done <= 0; tex_done <= 0; vlc_done <= 0; dn_done <= 0; vlc_flush_done <= 0;
      prev_st <= '0;
    end else begin
      me_done <= 0; mc_done <= 0; tex_done <= 0; vlc_done <= 0; dn_done <= 0; vlc_flush_done <= 0;
      prev_st <= state_o;
      if (me_start)  begin me_b <= 1; me_t = 5 + $urandom % 40; end
      else if (me_b)  begin if (me_t == 0) begin me_b <= 0; me_done <= 1; end else me_t--; end
      if (mc_start)  begin mc_b <= 1; mc_t = 3 + $urandom % 20; end
      else if (mc_b)  begin if (mc_t == 0) begin mc_b <= 0; mc_done <= 1; end else mc_t--; end
      if (tex_start) begin tex_b <= 1; tex_t = 5 + $urandom % 60; end
      else if (tex_b) begin if (tex_t == 0) begin tex_b <= 0; tex_done <= 1; end else tex_t--; end
      if (vlc_start) begin vlc_b <= 1; vlc_t = 5 + $urandom % 60; end
      else if (vlc_b) begin if (vlc_t == 0) begin vlc_b <= 0; vlc_done <= 1; end else vlc_t--; end
      if (dn_start)  begin dn_b <= 1; dn_t = 20; end
      else if (dn_b)  begin if (dn_t == 0) begin dn_b <= 0; dn_done <= 1; end else dn_t--; end
      if (vlc_flush) begin fl_b <= 1; fl_t = 3; end
      else if (fl_b)  begin if (fl_t == 0) begin fl_b <= 0; vlc_flush_done <= 1; end else fl_t--; end
    end
  end

  // checkers
  always @(posedge clk) if (rst_n && frame_busy) begin
    if (me_start) begin
      chk(32'(me_mb_x) == me_cnt % W && 32'(me_mb_y) == me_cnt / W, "ME position");
      chk(cur_type == FRAME_P && dn_seen == 1, "ME only in P frames after downsampling");
      me_cnt++;
    end
    if (mc_start) begin chk(mc_cnt < me_done_n, "MC after ME"); mc_cnt++; end
    if (me_done) me_done_n++;
    if (mc_done) mc_done_n++;
    if (tex_done) tex_done_n++;
    if (tex_start) begin
      chk(32'(tex_mb) == tex_cnt, "texture order");
      if (cur_type == FRAME_P) chk(tex_cnt < mc_done_n, "texture after MC");
      tex_cnt++;
    end
    if (vlc_start) begin
      chk(32'(vlc_mb) == vlc_cnt, "VLC order");
      chk(vlc_cnt < tex_done_n, "VLC after texture");
      chk(vlc_swap, "VLC buffer swap with start");
      vlc_cnt++;
    end
    if (dn_start) begin
      dn_cnt++; dn_seen++;
      if (cur_type == FRAME_I) chk(vlc_cnt == N && !vlc_b, "I frame downsampling after the last VLC");
      else chk(me_cnt == 0, "P frame downsampling first");
    end
    if (vlc_flush) flush_cnt++;
    if (dmac_wr) begin
      chk(dmac_data == 8'h03, "DMAC status value");
      chk(flush_cnt == 1 && !vlc_b && !tex_b && !me_b && !mc_b, "DMAC write after everything");
      dmac_cnt++;
    end
    if (me_b && tex_b) overlap++;
    if (state_o == 4'd2 && prev_st != 4'd2) i_loops++;
    if (state_o == 4'd5 && prev_st == 4'd6) p_loops++;
  end

  task automatic run_frame(input frame_type_e t, input bit exp_sel);
    me_cnt = 0; mc_cnt = 0; tex_cnt = 0; vlc_cnt = 0; dn_cnt = 0; dmac_cnt = 0; flush_cnt = 0;
    me_done_n = 0; mc_done_n = 0; tex_done_n = 0; i_loops = 0; p_loops = 0; dn_seen = 0;
    cur_type = t;
    @(negedge clk);
    frame_go = 1'b1; frame_type = t;
    @(negedge clk);
    frame_go = 1'b0;
    while (!frame_done) @(negedge clk);
    chk(mem_sel == exp_sel, "memory role");
    chk(tex_cnt == N && vlc_cnt == N && dn_cnt == 1 && dmac_cnt == 1, "all macroblocks coded");
    if (t == FRAME_P) begin
      chk(me_cnt == N && mc_cnt == N, "all macroblocks searched");
      chk(p_loops == N - 2, $sformatf("P loop count %0d", p_loops));
    end else begin
      chk(me_cnt == 0, "no ME in I frame");
      chk(i_loops == N, $sformatf("I loop count %0d", i_loops));
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    overlap = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame(FRAME_I, 1'b0);
    run_frame(FRAME_P, 1'b0);
    run_frame(FRAME_P, 1'b1);
    run_frame(FRAME_P, 1'b0);
    run_frame(FRAME_I, 1'b0);
    run_frame(FRAME_P, 1'b0);
    chk(overlap > 0, "coverage: ME overlapping texture coding");
    $display("ME/texture overlap cycles %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
