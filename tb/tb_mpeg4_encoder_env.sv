// tb_mpeg4_encoder_env: end-to-end environment for the encoder top, shared by
// the reduced-size and the full-size test.
//
// It models what surrounds the core: frame memories with the Level1/Level2
// images for the ME read ports, the reference frame for the MC fetch, the
// current-MB load, a texture coder, the header/DC code tables, the source of
// the downsampled frame, and an external bus with a 5-cycle read latency and
// random wait states, plus an ME input-buffer loader that competes for it.
// The texture model is lossless: the IDCT output it returns is the residue
// (P) or the pixel (I), so the reconstructed frame written over the bus must
// equal the current frame exactly, whatever vectors the ME chose. Its
// coefficients are a few values per block, so the number of coded symbols and
// the bitstream length (10-bit header, 8-bit DC words, 30-bit escape codes)
// are known. Checked per frame: reconstructed Y/U/V memory, Level2 output of
// the frame downsampler, Level1 words of the MB downsampler, symbol and
// bitstream word counts, one DMAC write of 0x03, the ME vector for a global
// shift between frames (interior MBs), and the memory-role select.
// Mechanism counters (I and P frames, role switch, VLC pre-empting the bus,
// ME loader stalls, FIFO drain, RLC FIFO pauses, bus wait states, packer
// flush, chroma half-pel vectors, Level2 ready) must all be non-zero.
//
// The pipeline, the bus priority and the DMA write follow the design
// description. The lossless texture model and the shifted test frames are
// the test's own.
module tb_mpeg4_encoder_env #(
  parameter bit FULL = 1'b0,
  parameter int W = 64,
  parameter int H = 48,
  parameter int NFRAMES = 3
) ();
  import mpeg4_pkg::*;
  localparam int AW = 24;
  localparam int NMB = (W / 16) * (H / 16);
  localparam int MBW = W / 16;
  localparam logic [AW-1:0] BS_BASE = 24'h100000;
  localparam int YS = W * H;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- DUT ports ----------------
  logic frame_go = 1'b0; frame_type_e frame_type = FRAME_I;
  logic frame_busy, frame_done, mem_sel;
  logic ds_frame_start, ds_frame_done, me_mb_done, bus_fifo_pending, vlc_rlc_pause;
  logic ds_l1_rd_row = 1'b0; logic [$clog2(W/8)-1:0] ds_l1_rd_addr = '0; logic [$clog2(W/16)-1:0] ds_l2_rd_addr = '0;
  logic ds_in_valid = 1'b0; logic [31:0] ds_in_word = '0;
  logic ds_l1_wr_en, ds_l1_wr_row, ds_l2_wr_en;
  logic [$clog2(W/8)-1:0] ds_l1_wr_addr; logic [$clog2(W/16)-1:0] ds_l2_wr_addr;
  logic [31:0] ds_l1_wr_data, ds_l2_wr_data, ds_l1_rd_data, ds_l2_rd_data;
  me_level_e me_rd_level; logic me_cur_rd_en, me_prev_rd_en;
  logic signed [10:0] me_cur_rd_x [2], me_cur_rd_y [2], me_prev_rd_x [3], me_prev_rd_y [3];
  pixel_t me_cur_rd_pix [2], me_prev_rd_pix [3];
  mv_t me_mv, me_cand_mv [2]; sad_t me_sad;
  logic mc_cur_wr_en = 1'b0; logic [8:0] mc_cur_wr_addr = '0; pixel_t mc_cur_wr_data = '0;
  logic mc_ref_rd_en; logic [1:0] mc_ref_rd_plane; logic signed [10:0] mc_ref_rd_x, mc_ref_rd_y;
  pixel_t mc_ref_rd_data;
  logic tex_start, tex_done, tex_res_valid; logic [8:0] tex_mb, tex_res_idx;
  logic signed [8:0] tex_res_data;
  logic tex_idct_valid = 1'b0, tex_idct_intra = 1'b0; logic [8:0] tex_idct_idx = '0;
  logic signed [8:0] tex_idct_data = '0;
  coef_t tex_dc_a = '0, tex_dc_b = '0, tex_dc_c = '0; logic tex_ac_pred = 1'b0;
  logic tex_from_c; coef_t tex_dc_pred; scan_e tex_scan;
  logic tex_coef_wr_en = 1'b0; logic [2:0] tex_coef_wr_blk = '0; logic [5:0] tex_coef_wr_addr = '0;
  coef_t tex_coef_wr_data = '0; logic tex_info_wr_en = 1'b0; mb_info_t tex_info_wr = '0;
  logic lut_req, lut_kind, lut_word_valid, lut_done; logic [2:0] lut_blk; coef_t lut_dc;
  mb_info_t lut_info; vlc_word_t lut_word;
  logic mbd_l1_valid, mbd_l1_x4, mbd_l2_ready; logic [2:0] mbd_l1_y; logic [31:0] mbd_l1_word, mbd_l2_rd_data;
  logic [1:0] mbd_l2_rd_addr = '0;
  logic me_mb_start; logic [4:0] me_mb_x, me_mb_y;
  logic ld_req = 1'b0, ld_ack, ld_rvalid; logic [AW-1:0] ld_addr = '0; logic [31:0] ld_rdata;
  logic bus_req, bus_we, bus_ready = 1'b0, bus_rvalid = 1'b0; logic [AW-1:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata = '0; logic [1:0] bus_grant;
  logic dmac_wr; logic [7:0] dmac_data;
  logic vlc_sym_fire, vlc_code_fire, vlc_bs_fire; logic [3:0] ctrl_state; logic [8:0] vlc_mb;
  logic [2:0] unit_busy;

  if (FULL) begin : g_full
    mpeg4_encoder dut (.*);
  end else begin : g_small
    mpeg4_encoder #(.IMG_W(W), .IMG_H(H)) dut (.*);
  end

  // ---------------- frames ----------------
  // planes: 0 Y (W x H), 1 U, 2 V (W/2 x H/2)
  pixel_t cur [3][H][W];
  pixel_t prv [3][H][W];
  pixel_t cl1 [H/2][W/2], cl2 [H/4][W/4], pl1 [H/2][W/2], pl2 [H/4][W/4];
  int shx, shy;

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic make_levels();
    for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x++) begin
      cl1[y][x] = 8'((int'(cur[0][2*y][2*x]) + cur[0][2*y][2*x+1] + cur[0][2*y+1][2*x] + cur[0][2*y+1][2*x+1]) / 4);
      pl1[y][x] = 8'((int'(prv[0][2*y][2*x]) + prv[0][2*y][2*x+1] + prv[0][2*y+1][2*x] + prv[0][2*y+1][2*x+1]) / 4);
    end
    for (int y = 0; y < H / 4; y++) for (int x = 0; x < W / 4; x++) begin
      cl2[y][x] = 8'((int'(cl1[2*y][2*x]) + cl1[2*y][2*x+1] + cl1[2*y+1][2*x] + cl1[2*y+1][2*x+1]) / 4);
      pl2[y][x] = 8'((int'(pl1[2*y][2*x]) + pl1[2*y][2*x+1] + pl1[2*y+1][2*x] + pl1[2*y+1][2*x+1]) / 4);
    end
  endtask

  // smooth random texture: hashed values on an 8-pixel grid, blended
  // bilinearly
  function automatic pixel_t tex_at(int x, int y, int seed);
    int gx, gy, fx, fy, a, b, c, d, v;
    gx = x >>> 3; gy = y >>> 3; fx = x & 7; fy = y & 7;
    a = int'(((gx * 73856093) ^ (gy * 19349663) ^ seed) & 255);
    b = int'((((gx + 1) * 73856093) ^ (gy * 19349663) ^ seed) & 255);
    c = int'(((gx * 73856093) ^ ((gy + 1) * 19349663) ^ seed) & 255);
    d = int'((((gx + 1) * 73856093) ^ ((gy + 1) * 19349663) ^ seed) & 255);
    v = (a * (8 - fx) * (8 - fy) + b * fx * (8 - fy) + c * (8 - fx) * fy + d * fx * fy) / 64;
    return 8'(v);
  endfunction

  // ---------------- ME read ports (one-cycle latency) ----------------
  function automatic pixel_t lvl_pix(bit is_cur, me_level_e l, int x, int y);
    case (l)
      LVL2: begin x = clampi(x, 0, W / 4 - 1); y = clampi(y, 0, H / 4 - 1); return is_cur ? cl2[y][x] : pl2[y][x]; end
      LVL1: begin x = clampi(x, 0, W / 2 - 1); y = clampi(y, 0, H / 2 - 1); return is_cur ? cl1[y][x] : pl1[y][x]; end
      default: begin x = clampi(x, 0, W - 1); y = clampi(y, 0, H - 1); return is_cur ? cur[0][y][x] : prv[0][y][x]; end
    endcase
  endfunction
  always @(posedge clk) begin
    for (int i = 0; i < 2; i++) me_cur_rd_pix[i] <= lvl_pix(1'b1, me_rd_level, int'(me_cur_rd_x[i]), int'(me_cur_rd_y[i]));
    for (int i = 0; i < 3; i++) me_prev_rd_pix[i] <= lvl_pix(1'b0, me_rd_level, int'(me_prev_rd_x[i]), int'(me_prev_rd_y[i]));
    if (mc_ref_rd_plane == 2'd0)
      mc_ref_rd_data <= prv[0][clampi(int'(mc_ref_rd_y), 0, H - 1)][clampi(int'(mc_ref_rd_x), 0, W - 1)];
    else
      mc_ref_rd_data <= prv[mc_ref_rd_plane][clampi(int'(mc_ref_rd_y), 0, H / 2 - 1)][clampi(int'(mc_ref_rd_x), 0, W / 2 - 1)];
  end

  function automatic void mb_pix_pos(int mb, int idx, output int pl, output int x, output int y);
    int mx, my;
    mx = mb % MBW; my = mb / MBW;
    if (idx < 256) begin pl = 0; x = mx * 16 + idx % 16; y = my * 16 + idx / 16; end
    else begin pl = (idx < 320) ? 1 : 2; x = mx * 8 + (idx % 64) % 8; y = my * 8 + (idx % 64) / 8; end
  endfunction

  // current MB load into the MC unit while the ME runs
  always @(posedge clk) begin
    if (!rst_n) mc_cur_wr_en <= 1'b0;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && me_mb_start) begin
        int mb, pl, x, y;
        mb = int'(me_mb_y) * MBW + int'(me_mb_x);
        for (int i = 0; i < 384; i++) begin
          @(negedge clk);
          mb_pix_pos(mb, i, pl, x, y);
          mc_cur_wr_en = 1'b1; mc_cur_wr_addr = 9'(i); mc_cur_wr_data = cur[pl][y][x];
        end
        @(negedge clk);
        mc_cur_wr_en = 1'b0;
      end
    end
  end

  // ---------------- texture coder model ----------------
  // residues of the MB the MC has fetched (the DCT input buffer), ping-pong
  logic signed [8:0] resbuf [2][384];
  int res_wb = 0, n_res = 0;
  always @(posedge clk) if (rst_n) begin
    if (tex_res_valid) begin resbuf[res_wb][tex_res_idx] <= tex_res_data; n_res++; end
    if (tex_res_valid && tex_res_idx == 9'd383) res_wb <= 1 - res_wb;
  end
  int res_rb = 0;
  int exp_syms = 0, exp_bits = 0;
  frame_type_e ftype;
  int n_halfpel = 0;
  initial begin
    tex_done = 1'b0;
    forever begin
      @(posedge clk);
      if (rst_n && tex_start) begin
        int mb, pl, x, y, idx;
        coef_t v;
        mb_info_t inf;
        mb = int'(tex_mb);
        inf = '0;
        inf.intra = (ftype == FRAME_I);
        inf.cbp = (mb % 5 == 1) ? 6'h2a : 6'h3f;
        // coefficients: DC plus three AC values per block, taken from the data
        exp_bits += 10;
        for (int b = 0; b < 6; b++) begin
          for (int a = 0; a < 64; a++) begin
            @(negedge clk);
            idx = (b < 4) ? ((b / 2) * 8 + a / 8) * 16 + (b % 2) * 8 + a % 8 : 256 + (b - 4) * 64 + a;
            mb_pix_pos(mb, idx, pl, x, y);
            if (inf.intra) v = coef_t'(int'(cur[pl][y][x]) - 128);
            else v = coef_t'(resbuf[res_rb][idx]);
            if (!(a == 0 || a == 1 || a == 9 || a == 18 || (a == 63 && b == 2))) v = '0;
            if (a == 18 && v == 0) v = 12'sd1;
            tex_coef_wr_en = 1'b1; tex_coef_wr_blk = 3'(b); tex_coef_wr_addr = 6'(a); tex_coef_wr_data = v;
            if (inf.intra && a == 0) exp_bits += 8;
            else if (inf.cbp[b] && v != 0) begin exp_syms++; exp_bits += 30; end
          end
        end
        @(negedge clk);
        tex_coef_wr_en = 1'b0; tex_info_wr_en = 1'b1; tex_info_wr = inf;
        @(negedge clk);
        tex_info_wr_en = 1'b0;
        // IDCT output, block by block, row by row
        for (int b = 0; b < 6; b++)
          for (int a = 0; a < 64; a++) begin
            @(negedge clk);
            idx = (b < 4) ? ((b / 2) * 8 + a / 8) * 16 + (b % 2) * 8 + a % 8 : 256 + (b - 4) * 64 + a;
            mb_pix_pos(mb, idx, pl, x, y);
            tex_idct_valid = 1'b1; tex_idct_idx = 9'(idx); tex_idct_intra = inf.intra;
            tex_idct_data = inf.intra ? 9'(cur[pl][y][x]) : resbuf[res_rb][idx];
          end
        @(negedge clk);
        tex_idct_valid = 1'b0;
        if (!inf.intra) res_rb = 1 - res_rb;
        tex_done = 1'b1;
        @(negedge clk);
        tex_done = 1'b0;
      end
    end
  end

  // ---------------- header / DC tables ----------------
  logic lut_busy;
  always @(posedge clk) begin
    if (!rst_n) begin lut_word_valid <= 1'b0; lut_done <= 1'b0; lut_busy <= 1'b0; lut_word <= '0; end
    else begin
      lut_word_valid <= 1'b0; lut_done <= 1'b0;
      if (lut_req && !lut_busy && !lut_done) begin
        lut_busy <= 1'b1; lut_word_valid <= 1'b1;
        if (!lut_kind) begin lut_word.code <= {22'd0, 8'(vlc_mb), 2'b10}; lut_word.len <= 6'd10; end
        else begin lut_word.code <= {24'd0, lut_dc[7:0]}; lut_word.len <= 6'd8; end
      end else if (lut_busy) begin lut_busy <= 1'b0; lut_done <= 1'b1; end
    end
  end

  // ---------------- frame downsampler source ----------------
  int n_ds_words = 0, n_ds_frames = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && ds_frame_start) begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x += 4) begin
            @(negedge clk);
            while (($urandom % 8) == 0) begin ds_in_valid = 1'b0; @(negedge clk); end
            ds_in_valid = 1'b1;
            ds_in_word = {cur[0][y][x+3], cur[0][y][x+2], cur[0][y][x+1], cur[0][y][x]};
            n_ds_words++;
          end
        @(negedge clk);
        ds_in_valid = 1'b0;
      end
    end
  end

  // Level2 output check
  int l2_count = 0, n_ds_loops = 0;
  always @(posedge clk) if (rst_n) begin
    if (ds_l2_wr_en) begin
      int row, x0;
      logic [31:0] e;
      row = l2_count / (W / 16);
      x0 = int'(ds_l2_wr_addr) * 4;
      for (int i = 0; i < 4; i++) e[8*i +: 8] = cl2[row][x0 + i];
      chk(ds_l2_wr_data == e, "frame downsampler Level2");
      l2_count++;
    end
    if (ds_frame_start) l2_count = 0;
    if (ds_l2_wr_en && 32'(ds_l2_wr_addr) == W / 16 - 1) n_ds_loops++;
    if (ds_frame_done) n_ds_frames++;
  end

  // MB downsampler Level1 check (reconstruction equals the current frame)
  int n_l2_ready = 0, n_mbd = 0;
  always @(posedge clk) if (rst_n) begin
    if (mbd_l1_valid) begin
      logic [31:0] e;
      int mx, my;
      mx = int'(tex_mb) % MBW; my = int'(tex_mb) / MBW;
      for (int i = 0; i < 4; i++) e[8*i +: 8] = cl1[my * 8 + int'(mbd_l1_y)][mx * 8 + (mbd_l1_x4 ? 4 : 0) + i];
      chk(mbd_l1_word == e, "MB downsampler Level1");
      n_mbd++;
    end
    if (mbd_l2_ready) n_l2_ready++;
  end

  // ---------------- bus and memory ----------------
  logic [31:0] recon_mem [YS * 3 / 8];
  int bs_words = 0, n_vlc_pre = 0, n_wait = 0, n_fifo = 0, n_ld_stall = 0, n_dmac = 0;
  logic [4:0] rv_pipe;
  always @(posedge clk) begin
    if (!rst_n) begin rv_pipe <= '0; bus_rvalid <= 1'b0; end
    else begin
      rv_pipe <= {rv_pipe[3:0], bus_req && bus_ready && !bus_we};
      bus_rvalid <= rv_pipe[4];
      bus_rdata <= $urandom;
      if (bus_req && !bus_ready) n_wait++;
      if (bus_req && bus_ready && bus_we) begin
        if (bus_addr >= BS_BASE) begin
          chk(bus_addr == BS_BASE + AW'(bs_words), "bitstream address");
          bs_words++;
        end else begin
          chk(int'(bus_addr) < YS * 3 / 8, "reconstruction address");
          recon_mem[bus_addr] <= bus_wdata;
        end
      end
      if (bus_grant == 2'd1 && bus_fifo_pending) n_vlc_pre++;
      if (bus_grant == 2'd3 && bus_ready) n_fifo++;
      if (ld_req && !ld_ack) n_ld_stall++;
      if (dmac_wr) begin chk(dmac_data == 8'h03, "DMAC value"); n_dmac++; end
    end
  end
  always @(negedge clk) begin
    bus_ready = ($urandom % 5) != 0;
    if (!ld_req || ld_ack) begin ld_req = ($urandom % 16) == 0; ld_addr = AW'($urandom); end
  end

  int n_syms = 0, n_afull = 0;
  always @(posedge clk) if (rst_n) begin
    if (vlc_sym_fire) n_syms++;
    if (vlc_rlc_pause) n_afull++;
  end

  // ME vector check for a global shift, interior macroblocks
  int n_me = 0, n_mv_ok = 0, n_mv_chk = 0;
  bit mv_check = 1'b0;
  logic [4:0] me_x_q, me_y_q;
  always @(posedge clk) if (rst_n) begin
    if (me_mb_start) begin me_x_q <= me_mb_x; me_y_q <= me_mb_y; end
    if (me_mb_done) begin
      n_me++;
      if (me_mv.x[0] || me_mv.y[0]) n_halfpel++;
      if (mv_check && me_x_q > 0 && me_y_q > 0 && 32'(me_x_q) < MBW - 1 && 32'(me_y_q) < H / 16 - 1) begin
        n_mv_chk++;
        if (int'(me_mv.x) == shx && int'(me_mv.y) == shy) n_mv_ok++;
        else $display("MB (%0d,%0d): vector (%0d,%0d), shift (%0d,%0d)", me_x_q, me_y_q, int'(me_mv.x), int'(me_mv.y), shx, shy);
      end
    end
  end

  // AC/DC prediction direction: random inputs, compare with the rule
  always @(negedge clk) begin
    tex_dc_a = coef_t'($urandom % 512); tex_dc_b = coef_t'($urandom % 512); tex_dc_c = coef_t'($urandom % 512);
    tex_ac_pred = 1'($urandom);
  end
  int n_scan [3];
  always @(posedge clk) if (rst_n) begin
    int da, dc;
    da = int'(tex_dc_a) - int'(tex_dc_b); if (da < 0) da = -da;
    dc = int'(tex_dc_b) - int'(tex_dc_c); if (dc < 0) dc = -dc;
    chk(tex_from_c == (da < dc), "prediction direction");
    n_scan[tex_scan]++;
  end

  // ---------------- frame sequence ----------------
  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_i, n_p, n_switch, t0, seed, ox, oy;
    bit last_sel;
    for (int i = 0; i < 3; i++) n_scan[i] = 0;
    n_i = 0; n_p = 0; n_switch = 0; last_sel = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    seed = 12345; ox = 0; oy = 0;
    for (int pl = 0; pl < 3; pl++)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        cur[pl][y][x] = (pl == 0 || (x < W / 2 && y < H / 2)) ? tex_at(x, y, seed + pl) : 8'd0;
    for (int f = 0; f < NFRAMES; f++) begin
      int bs0, syms0, bits0;
      ftype = (f == 0) ? FRAME_I : FRAME_P;
      if (f > 0) begin
        // the new frame is the old one moved by (shx, shy): the vector
        // (shx, shy) points from the current block to its match in the
        // previous frame; (ox, oy) is the total offset from the first frame
        prv = cur;
        // shifts that are multiples of 4 are found exactly by the three-level
        // search on this texture; the odd one exercises the chroma half pels
        case (f % 3)
          1: begin shx = 4;  shy = -4; end
          2: begin shx = -8; shy = 4;  end
          default: begin shx = 3; shy = -5; end
        endcase
        ox += shx; oy += shy;
        mv_check = (f % 3) != 0;
        for (int pl = 0; pl < 3; pl++)
          for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
            if (pl == 0) cur[0][y][x] = tex_at(x + ox, y + oy, seed);
            else if (x < W / 2 && y < H / 2) cur[pl][y][x] = tex_at(x + ox / 2, y + oy / 2, seed + pl);
      end
      make_levels();
      bs_words = 0; exp_syms = 0; exp_bits = 0; n_syms = 0;
      @(negedge clk);
      frame_go = 1'b1; frame_type = ftype;
      @(negedge clk);
      frame_go = 1'b0;
      t0 = int'($time / 10);
      while (!frame_done) @(negedge clk);
      $display("frame %0d (%s): %0d cycles", f, ftype == FRAME_I ? "I" : "P", int'($time / 10) - t0);
      if (ftype == FRAME_I) n_i++; else n_p++;
      if (mem_sel != last_sel) n_switch++;
      last_sel = mem_sel;
      chk(mem_sel == ((f >= 2) ? 1'((f - 1) % 2) : 1'b0), "memory role");
      repeat (3000) @(negedge clk);     // let the reconstruction FIFOs drain
      chk(n_syms == exp_syms, $sformatf("symbols %0d/%0d", n_syms, exp_syms));
      chk(bs_words == (exp_bits + 31) / 32, $sformatf("bitstream words %0d/%0d", bs_words, (exp_bits + 31) / 32));
      // reconstructed frame in memory
      begin
        int bad;
        bad = 0;
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x += 4) begin
          logic [31:0] e;
          for (int i = 0; i < 4; i++) e[8*i +: 8] = cur[0][y][x + i];
          if (recon_mem[(y * W + x) / 4] != e) bad++;
        end
        for (int pl = 1; pl < 3; pl++)
          for (int y = 0; y < H / 2; y++) for (int x = 0; x < W / 2; x += 4) begin
            logic [31:0] e;
            for (int i = 0; i < 4; i++) e[8*i +: 8] = cur[pl][y][x + i];
            if (recon_mem[(YS + (pl - 1) * YS / 4 + y * W / 2 + x) / 4] != e) bad++;
          end
        chk(bad == 0, $sformatf("reconstructed frame, %0d bad words", bad));
      end
    end
    chk(n_dmac == NFRAMES, "one DMAC write per frame");
    chk(n_mv_chk == 0 || n_mv_ok == n_mv_chk, $sformatf("ME vectors %0d/%0d", n_mv_ok, n_mv_chk));
    $display("mechanisms: I frames %0d, P frames %0d, memory role switches %0d, ME searches %0d, MC residues %0d",
             n_i, n_p, n_switch, n_me, n_res);
    $display("  frame-downsampler loops %0d, MB Level2 ready %0d, MB Level1 words %0d", n_ds_loops, n_l2_ready, n_mbd);
    $display("  VLC pre-empting the FIFO drain %0d, ME loader stalls %0d, FIFO words drained %0d, bus wait states %0d",
             n_vlc_pre, n_ld_stall, n_fifo, n_wait);
    $display("  RLC FIFO pauses %0d, odd (chroma half-pel) vectors %0d, DMAC writes %0d, scans zz/h/v %0d/%0d/%0d",
             n_afull, n_halfpel, n_dmac, n_scan[0], n_scan[1], n_scan[2]);
    chk(n_i > 0 && n_p > 0 && n_switch > 0 && n_me > 0 && n_res > 0, "coverage: frames and units");
    chk(n_ds_loops > 0 && n_l2_ready > 0 && n_mbd > 0, "coverage: downsampling");
    chk(n_vlc_pre > 0 && n_ld_stall > 0 && n_fifo > 0 && n_wait > 0, "coverage: bus");
    chk(n_afull > 0 && n_halfpel > 0 && n_scan[1] > 0 && n_scan[2] > 0 && n_scan[0] > 0, "coverage: coding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
