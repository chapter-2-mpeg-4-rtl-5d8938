// mpeg4_encoder: top level of the MPEG-4 simple-profile video encoder core.
//
// Three-stage macroblock pipeline under encoder_ctrl: the motion unit
// (motion_estimator followed by the mc_unit fetch/subtract), texture coding
// (external: DCT/Q/IQ/IDCT and AC/DC prediction, with the dc_pred_dir
// direction/scan decision inside this core) and the vlc_unit. The frame
// downsampler (downsample_unit) makes the Level1/Level2 images before each P
// frame; the mb_downsampler derives Level1/Level2 of each reconstructed
// macroblock. bus_arbiter shares the system bus: VLC bitstream words first,
// motion unit reads second, reconstructed pixels (through two pairs of
// FIFOs) last.
//
// Parts outside this core appear as ports: the status register (frame_go,
// frame_type), the ME search-window buffers (me_* read ports, one-cycle
// latency), the reference frame port of the MC fetch (mc_ref_*), the current
// MB load (mc_cur_wr_*), the texture coder (tex_*), the header/DC code tables
// (lut_*), the source of the frame to be downsampled (ds_in_*), the Level1 /
// Level2 result writes (ds_l1_*, ds_l2_*, mbd_*), the ME input-buffer loader
// (ld_*) and the external bus with the DMAC status write (bus_*, dmac_*).
//
// Own choices: reconstructed pixels are packed four to a 32-bit word in
// raster order of a planar frame (Y, then U, then V) at RECON_BASE; the
// bitstream is written from BS_BASE upwards, restarting every frame; the
// texture coder delivers IDCT output block by block, row by row (Y1..Y4, U,
// V), which the mb_downsampler needs.
//
// From the published design: the partition into controller, motion unit, texture
// coding port, VLC, reconstruction FIFOs and bus multiplexer, and the
// three-stage macroblock pipeline.
module mpeg4_encoder
  import mpeg4_pkg::*;
#(
  parameter int unsigned IMG_W      = 352,
  parameter int unsigned IMG_H      = 288,
  parameter int unsigned N_MB       = (IMG_W / 16) * (IMG_H / 16),
  parameter int unsigned FIFO_DEPTH = 48,
  parameter int unsigned AW         = 24,
  parameter logic [AW-1:0] BS_BASE    = 24'h100000,
  parameter logic [AW-1:0] RECON_BASE = 24'h000000
) (
  input  logic          clk,
  input  logic          rst_n,
  // status register
  input  logic          frame_go,
  input  frame_type_e   frame_type,
  output logic          frame_busy,
  output logic          frame_done,
  output logic          mem_sel,
  // frame downsampling
  output logic          ds_frame_start,   // send the frame to be downsampled
  output logic          ds_frame_done,
  input  logic          ds_in_valid,
  input  logic [31:0]   ds_in_word,
  output logic          ds_l1_wr_en,
  output logic          ds_l1_wr_row,
  output logic [$clog2(IMG_W/8)-1:0]  ds_l1_wr_addr,
  output logic [31:0]   ds_l1_wr_data,
  output logic          ds_l2_wr_en,
  output logic [$clog2(IMG_W/16)-1:0] ds_l2_wr_addr,
  output logic [31:0]   ds_l2_wr_data,
  input  logic          ds_l1_rd_row,
  input  logic [$clog2(IMG_W/8)-1:0]  ds_l1_rd_addr,
  output logic [31:0]   ds_l1_rd_data,
  input  logic [$clog2(IMG_W/16)-1:0] ds_l2_rd_addr,
  output logic [31:0]   ds_l2_rd_data,
  // ME search-window buffers
  output me_level_e     me_rd_level,
  output logic          me_cur_rd_en,
  output logic signed [10:0] me_cur_rd_x [2],
  output logic signed [10:0] me_cur_rd_y [2],
  input  pixel_t        me_cur_rd_pix [2],
  output logic          me_prev_rd_en,
  output logic signed [10:0] me_prev_rd_x [3],
  output logic signed [10:0] me_prev_rd_y [3],
  input  pixel_t        me_prev_rd_pix [3],
  output logic          me_mb_start,      // ME of (me_mb_x, me_mb_y) begins: load its windows
  output logic [4:0]    me_mb_x,
  output logic [4:0]    me_mb_y,
  output logic          me_mb_done,
  output mv_t           me_mv,
  output sad_t          me_sad,
  output mv_t           me_cand_mv [2],
  // MC
  input  logic          mc_cur_wr_en,
  input  logic [8:0]    mc_cur_wr_addr,
  input  pixel_t        mc_cur_wr_data,
  output logic          mc_ref_rd_en,
  output logic [1:0]    mc_ref_rd_plane,
  output logic signed [10:0] mc_ref_rd_x,
  output logic signed [10:0] mc_ref_rd_y,
  input  pixel_t        mc_ref_rd_data,
  // texture coder
  output logic          tex_start,
  output logic [8:0]    tex_mb,
  input  logic          tex_done,
  output logic          tex_res_valid,
  output logic [8:0]    tex_res_idx,
  output logic signed [8:0] tex_res_data,
  input  logic          tex_idct_valid,
  input  logic          tex_idct_intra,
  input  logic [8:0]    tex_idct_idx,
  input  logic signed [8:0] tex_idct_data,
  input  coef_t         tex_dc_a,
  input  coef_t         tex_dc_b,
  input  coef_t         tex_dc_c,
  input  logic          tex_ac_pred,
  output logic          tex_from_c,
  output coef_t         tex_dc_pred,
  output scan_e         tex_scan,
  input  logic          tex_coef_wr_en,
  input  logic [2:0]    tex_coef_wr_blk,
  input  logic [5:0]    tex_coef_wr_addr,
  input  coef_t         tex_coef_wr_data,
  input  logic          tex_info_wr_en,
  input  mb_info_t      tex_info_wr,
  // header / DC tables
  output logic          lut_req,
  output logic          lut_kind,
  output logic [2:0]    lut_blk,
  output coef_t         lut_dc,
  output mb_info_t      lut_info,
  input  logic          lut_word_valid,
  input  vlc_word_t     lut_word,
  input  logic          lut_done,
  // reconstructed MB, Level1/Level2
  output logic          mbd_l1_valid,
  output logic [2:0]    mbd_l1_y,
  output logic          mbd_l1_x4,
  output logic [31:0]   mbd_l1_word,
  output logic          mbd_l2_ready,
  input  logic [1:0]    mbd_l2_rd_addr,
  output logic [31:0]   mbd_l2_rd_data,
  // ME input-buffer loader on the bus
  input  logic          ld_req,
  input  logic [AW-1:0] ld_addr,
  output logic          ld_ack,
  output logic          ld_rvalid,
  output logic [31:0]   ld_rdata,
  // system bus and DMAC
  output logic          bus_req,
  output logic          bus_we,
  output logic [AW-1:0] bus_addr,
  output logic [31:0]   bus_wdata,
  input  logic          bus_ready,
  input  logic          bus_rvalid,
  input  logic [31:0]   bus_rdata,
  output logic [1:0]    bus_grant,
  output logic          bus_fifo_pending,
  output logic          dmac_wr,
  output logic [7:0]    dmac_data,
  // activity strobes
  output logic          vlc_sym_fire,
  output logic          vlc_code_fire,
  output logic          vlc_bs_fire,
  output logic          vlc_rlc_pause,
  output logic [3:0]    ctrl_state,
  output logic [8:0]    vlc_mb,
  output logic [2:0]    unit_busy         // {VLC, MC, ME}
);
  localparam int unsigned MB_W   = IMG_W / 16;
  localparam int unsigned N_LOOP = IMG_H / 4;
  localparam int unsigned Y_SIZE = IMG_W * IMG_H;

  // ---------------- controller ----------------
  logic dn_start, dn_done, me_start, me_done, mc_start, mc_done, mc_swap;
  logic vlc_swap, vlc_start, vlc_done, vlc_flush, vlc_flush_done, vlc_init;

  encoder_ctrl #(.N_MB(N_MB), .MB_W(MB_W)) u_ctrl (
    .clk, .rst_n, .frame_go, .frame_type, .frame_busy, .frame_done, .vlc_init, .mem_sel,
    .dn_start, .dn_done, .me_start, .me_mb_x, .me_mb_y, .me_done,
    .mc_start, .mc_done, .mc_swap, .tex_start, .tex_mb, .tex_done,
    .vlc_swap, .vlc_start, .vlc_mb, .vlc_done, .vlc_flush, .vlc_flush_done,
    .dmac_wr, .dmac_data, .state_o(ctrl_state)
  );

  assign me_mb_start    = me_start;
  assign me_mb_done     = me_done;
  assign ds_frame_start = dn_start;
  assign ds_frame_done  = dn_done;

  // ---------------- frame downsampler ----------------
  logic ds_loop_done;
  logic [$clog2(N_LOOP+1)-1:0] ds_loops;
  downsample_unit #(.IMG_W(IMG_W)) u_ds (
    .clk, .rst_n, .frame_start(dn_start), .in_valid(ds_in_valid), .in_word(ds_in_word),
    .l1_wr_en(ds_l1_wr_en), .l1_wr_row(ds_l1_wr_row), .l1_wr_addr(ds_l1_wr_addr),
    .l1_wr_data(ds_l1_wr_data), .l2_wr_en(ds_l2_wr_en), .l2_wr_addr(ds_l2_wr_addr),
    .l2_wr_data(ds_l2_wr_data), .loop_done(ds_loop_done),
    .l1_rd_row(ds_l1_rd_row), .l1_rd_addr(ds_l1_rd_addr), .l1_rd_data(ds_l1_rd_data),
    .l2_rd_addr(ds_l2_rd_addr), .l2_rd_data(ds_l2_rd_data)
  );
  // the frame is done after IMG_H/4 loops
  always_ff @(posedge clk) begin
    if (!rst_n) begin ds_loops <= '0; dn_done <= 1'b0; end
    else begin
      dn_done <= 1'b0;
      if (dn_start) ds_loops <= '0;
      else if (ds_loop_done) begin
        if (32'(ds_loops) == N_LOOP - 1) begin ds_loops <= '0; dn_done <= 1'b1; end
        else ds_loops <= ds_loops + 1'b1;
      end
    end
  end

  // ---------------- motion unit ----------------
  logic me_busy;
  motion_estimator u_me (
    .clk, .rst_n, .start(me_start), .mb_x(me_mb_x), .mb_y(me_mb_y),
    .busy(me_busy), .done(me_done), .mv(me_mv), .sad(me_sad), .cand_mv(me_cand_mv),
    .rd_level(me_rd_level), .cur_rd_en(me_cur_rd_en), .cur_rd_x(me_cur_rd_x),
    .cur_rd_y(me_cur_rd_y), .cur_rd_pix(me_cur_rd_pix), .prev_rd_en(me_prev_rd_en),
    .prev_rd_x(me_prev_rd_x), .prev_rd_y(me_prev_rd_y), .prev_rd_pix(me_prev_rd_pix)
  );

  logic       mc_busy, recon_valid;
  logic [8:0] recon_idx;
  pixel_t     recon_data;
  mc_unit u_mc (
    .clk, .rst_n, .cur_wr_en(mc_cur_wr_en), .cur_wr_addr(mc_cur_wr_addr),
    .cur_wr_data(mc_cur_wr_data), .start(mc_start), .mb_x(me_mb_x), .mb_y(me_mb_y),
    .mv(me_mv), .busy(mc_busy), .done(mc_done), .mb_swap(mc_swap),
    .ref_rd_en(mc_ref_rd_en), .ref_rd_plane(mc_ref_rd_plane), .ref_rd_x(mc_ref_rd_x),
    .ref_rd_y(mc_ref_rd_y), .ref_rd_data(mc_ref_rd_data),
    .res_valid(tex_res_valid), .res_idx(tex_res_idx), .res_data(tex_res_data),
    .idct_valid(tex_idct_valid), .idct_intra(tex_idct_intra), .idct_idx(tex_idct_idx),
    .idct_data(tex_idct_data), .recon_valid, .recon_idx, .recon_data
  );

  // ---------------- AC/DC prediction direction ----------------
  dc_pred_dir u_dcp (
    .dc_a(tex_dc_a), .dc_b(tex_dc_b), .dc_c(tex_dc_c), .intra(1'b1), .ac_pred(tex_ac_pred),
    .from_c(tex_from_c), .dc_pred(tex_dc_pred), .scan(tex_scan)
  );

  // ---------------- reconstructed MB: rows for the MB downsampler ----------
  // position of a reconstructed pixel inside its 8x8 block
  logic [2:0] r_blk, r_row, r_col;
  always_comb begin
    if (!recon_idx[8]) begin
      r_blk = {1'b0, recon_idx[7], recon_idx[3]};
      r_row = recon_idx[6:4];
      r_col = recon_idx[2:0];
    end else begin
      r_blk = recon_idx[6] ? 3'd5 : 3'd4;
      r_row = recon_idx[5:3];
      r_col = recon_idx[2:0];
    end
  end
  pixel_t     row_buf [8];
  logic       row_valid;
  logic [2:0] row_blk, row_num;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_valid <= 1'b0; row_blk <= '0; row_num <= '0;
      for (int i = 0; i < 8; i++) row_buf[i] <= '0;
    end else begin
      row_valid <= recon_valid && r_col == 3'd7;
      if (recon_valid) begin
        row_buf[r_col] <= recon_data;
        row_blk <= r_blk;
        row_num <= r_row;
      end
    end
  end
  pixel_t row_pix [8];
  always_comb begin
    row_pix = row_buf;
  end
  mb_downsampler u_mbd (
    .clk, .rst_n, .in_valid(row_valid), .in_blk(row_blk), .in_row(row_num), .in_pix(row_pix),
    .l1_valid(mbd_l1_valid), .l1_y(mbd_l1_y), .l1_x4(mbd_l1_x4), .l1_word(mbd_l1_word),
    .l2_ready(mbd_l2_ready), .l2_rd_addr(mbd_l2_rd_addr), .l2_rd_data(mbd_l2_rd_data)
  );

  // ---------------- reconstructed MB: words for the frame memory ----------
  logic [4:0]  t_mbx, t_mby;
  assign t_mbx = 5'(32'(tex_mb) % MB_W);
  assign t_mby = 5'(32'(tex_mb) / MB_W);
  logic [23:0] p_x, p_y, p_byte;
  always_comb begin
    if (!recon_idx[8]) begin
      p_x    = 24'(t_mbx) * 24'd16 + 24'(recon_idx[3:0]);
      p_y    = 24'(t_mby) * 24'd16 + 24'(recon_idx[7:4]);
      p_byte = p_y * 24'(IMG_W) + p_x;
    end else begin
      p_x    = 24'(t_mbx) * 24'd8 + 24'(recon_idx[2:0]);
      p_y    = 24'(t_mby) * 24'd8 + 24'(recon_idx[5:3]);
      p_byte = 24'(Y_SIZE) + (recon_idx[6] ? 24'(Y_SIZE / 4) : 24'd0)
             + p_y * 24'(IMG_W / 2) + p_x;
    end
  end
  logic [31:0]   rw_data;
  logic          rw_valid;
  logic [AW-1:0] rw_addr;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rw_data <= '0; rw_valid <= 1'b0; rw_addr <= '0;
    end else begin
      rw_valid <= recon_valid && p_byte[1:0] == 2'd3;
      if (recon_valid) begin
        rw_data <= {recon_data, rw_data[31:8]};
        rw_addr <= RECON_BASE + AW'(p_byte[23:2]);
      end
    end
  end

  // ---------------- VLC ----------------
  logic          bs_valid, bs_ready, vlc_busy;
  logic [31:0]   bs_word;
  logic [AW-1:0] bs_addr;
  vlc_unit u_vlc (
    .clk, .rst_n,
    .coef_wr_en(tex_coef_wr_en), .coef_wr_blk(tex_coef_wr_blk), .coef_wr_addr(tex_coef_wr_addr),
    .coef_wr_data(tex_coef_wr_data), .info_wr_en(tex_info_wr_en), .info_wr(tex_info_wr),
    .mb_swap(vlc_swap), .mb_start(vlc_start), .mb_busy(vlc_busy), .mb_done(vlc_done),
    .lut_req, .lut_kind, .lut_blk, .lut_dc, .lut_info, .lut_word_valid, .lut_word, .lut_done,
    .frame_flush(vlc_flush), .flush_done(vlc_flush_done),
    .bs_valid, .bs_word, .bs_ready, .sym_fire(vlc_sym_fire), .code_fire(vlc_code_fire),
    .rlc_pause(vlc_rlc_pause)
  );
  always_ff @(posedge clk) begin
    if (!rst_n) bs_addr <= BS_BASE;
    else if (vlc_init) bs_addr <= BS_BASE;
    else if (bs_valid && bs_ready) bs_addr <= bs_addr + 1'b1;
  end
  assign vlc_bs_fire = bs_valid && bs_ready;
  assign unit_busy   = {vlc_busy, mc_busy, me_busy};

  // ---------------- bus ----------------
  logic recon_ready;
  bus_arbiter #(.FIFO_DEPTH(FIFO_DEPTH), .AW(AW)) u_bus (
    .clk, .rst_n,
    .vlc_req(bs_valid), .vlc_addr(bs_addr), .vlc_data(bs_word), .vlc_ack(bs_ready),
    .me_req(ld_req), .me_addr(ld_addr), .me_ack(ld_ack), .me_rvalid(ld_rvalid), .me_rdata(ld_rdata),
    .recon_valid(rw_valid), .recon_addr(rw_addr), .recon_data(rw_data), .recon_ready,
    .recon_swap(mc_swap),
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ready, .bus_rvalid, .bus_rdata,
    .grant(bus_grant), .fifo_pending(bus_fifo_pending)
  );
  // the FIFOs are sized so that they never overflow within one time slot
  assert property (@(posedge clk) disable iff (!rst_n) rw_valid |-> recon_ready);
endmodule
