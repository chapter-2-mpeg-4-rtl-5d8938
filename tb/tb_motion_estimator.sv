// tb_motion_estimator: self-checking test of the hierarchical motion estimator.
// Builds a random previous frame (96x80) and a current frame that is the
// previous frame moved by a known vector plus noise, derives Level1 and
// Level2 images with the floor-of-2x2-mean filter, and serves them through
// one-cycle-latency read ports (coordinates clamped at the frame edge).
// A reference model in this file repeats the three-level search: Level2
// best-two in the order the two BSUs report positions, then the Level1
// minimum over both candidates, then the Level0 minimum. For several MBs it
// checks both Level2 candidates, the final vector and SAD, that a noiseless
// shift by a multiple of 4 is found exactly, and the search time (444 cycles
// from start to done).
//
// The three-level search and its candidate counts follow the design
// description. The 444-cycle length checked here is this design's (the
// published number is 495).
module tb_motion_estimator;
  import mpeg4_pkg::*;
  localparam int W = 96, H = 80;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [4:0] mb_x, mb_y;
  mv_t mv, cand_mv [2];
  sad_t sad;
  me_level_e rd_level;
  logic cur_rd_en, prev_rd_en;
  logic signed [10:0] cur_rd_x [2], cur_rd_y [2], prev_rd_x [3], prev_rd_y [3];
  pixel_t cur_rd_pix [2], prev_rd_pix [3];

  motion_estimator dut (.*);

  pixel_t cf [3][H][W];   // current frame, per level
  pixel_t pf [3][H][W];   // previous frame, per level

  function automatic pixel_t rd(input logic cur, input int lvl, input int x, input int y);
    int w = W >> lvl, h = H >> lvl;
    if (x < 0) x = 0; if (x > w - 1) x = w - 1;
    if (y < 0) y = 0; if (y > h - 1) y = h - 1;
    return cur ? cf[lvl][y][x] : pf[lvl][y][x];
  endfunction

  int lv;
  always_comb lv = (rd_level == LVL2) ? 2 : (rd_level == LVL1) ? 1 : 0;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) cur_rd_pix[i] <= rd(1, lv, int'(cur_rd_x[i]), int'(cur_rd_y[i]));
    for (int i = 0; i < 3; i++) prev_rd_pix[i] <= rd(0, lv, int'(prev_rd_x[i]), int'(prev_rd_y[i]));
  end

  function automatic int sad_at(int lvl, int n, int cx, int cy, int dx, int dy);
    int s = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int a = rd(1, lvl, cx + j, cy + i), b = rd(0, lvl, cx + j + dx, cy + i + dy);
        s += (a > b) ? a - b : b - a;
      end
    return s;
  endfunction

  task automatic build_frames(int sx, int sy, int noise);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) pf[0][y][x] = pixel_t'($urandom_range(0, 255));
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int v = rd(0, 0, x + sx, y + sy) + ((noise > 0) ? $urandom_range(0, noise) : 0);
      cf[0][y][x] = pixel_t'((v > 255) ? 255 : v);
    end
    for (int l = 1; l < 3; l++)
      for (int y = 0; y < (H >> l); y++) for (int x = 0; x < (W >> l); x++) begin
        cf[l][y][x] = pixel_t'((int'(cf[l-1][2*y][2*x]) + cf[l-1][2*y][2*x+1] + cf[l-1][2*y+1][2*x] + cf[l-1][2*y+1][2*x+1]) / 4);
        pf[l][y][x] = pixel_t'((int'(pf[l-1][2*y][2*x]) + pf[l-1][2*y][2*x+1] + pf[l-1][2*y+1][2*x] + pf[l-1][2*y+1][2*x+1]) / 4);
      end
  endtask

  // reference search
  int r_c2x [2], r_c2y [2], r_mvx, r_mvy, r_sad;
  task automatic ref_search(int mbx, int mby);
    int bs [2], bx [2], by [2];
    int l1x, l1y, b1;
    bs[0] = 1 << 30; bs[1] = 1 << 30; bx = '{0, 0}; by = '{0, 0};
    for (int t = 0; t < 64; t++)
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 2; r++) begin
          int k = t - 16 * r - 4 * b;
          if (k >= 0 && k < 25) begin
            int x = k % 5, y = k / 5, s;
            if (!(b == 1 && x == 0) && !(r == 1 && y == 0)) begin
              x = x + 4 * b - 4; y = y + 4 * r - 4;
              s = sad_at(2, 4, 4 * mbx, 4 * mby, x, y);
              if (s < bs[0]) begin bs[1] = bs[0]; bx[1] = bx[0]; by[1] = by[0]; bs[0] = s; bx[0] = x; by[0] = y; end
              else if (s < bs[1]) begin bs[1] = s; bx[1] = x; by[1] = y; end
            end
          end
        end
    r_c2x = bx; r_c2y = by;
    b1 = 1 << 30; l1x = 0; l1y = 0;
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 25; k++) begin
        int x = 2 * bx[c] + k % 5 - 2, y = 2 * by[c] + k / 5 - 2;
        int s = sad_at(1, 8, 8 * mbx, 8 * mby, x, y);
        if (s < b1) begin b1 = s; l1x = x; l1y = y; end
      end
    r_sad = 1 << 30;
    for (int k = 0; k < 25; k++) begin
      int x = 2 * l1x + k % 5 - 2, y = 2 * l1y + k / 5 - 2;
      int s = sad_at(0, 16, 16 * mbx, 16 * mby, x, y);
      if (s < r_sad) begin r_sad = s; r_mvx = x; r_mvy = y; end
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  initial begin
    int sxs [4] = '{4, -7, 12, 0};
    int sys [4] = '{-8, 5, -4, 0};
    start = 0; mb_x = 0; mb_y = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 4; f++) begin
      build_frames(sxs[f], sys[f], (f == 1) ? 6 : 0);
      for (int m = 0; m < 3; m++) begin
        int mbx, mby;
        mbx = (m == 0) ? 2 : (m == 1) ? 0 : 4;
        mby = (m == 0) ? 2 : (m == 1) ? 1 : 3;
        ref_search(mbx, mby);
        @(negedge clk);
        mb_x = 5'(mbx); mb_y = 5'(mby); start = 1;
        @(negedge clk);
        start = 0; cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (int'(cand_mv[c].x) != r_c2x[c] || int'(cand_mv[c].y) != r_c2y[c]) begin
            failures++; $display("FAIL f%0d mb(%0d,%0d) Level2 cand %0d (%0d,%0d) exp (%0d,%0d)", f, mbx, mby, c,
                                 cand_mv[c].x, cand_mv[c].y, r_c2x[c], r_c2y[c]);
          end
        end
        checks++;
        if (int'(mv.x) != r_mvx || int'(mv.y) != r_mvy || int'(sad) != r_sad) begin
          failures++; $display("FAIL f%0d mb(%0d,%0d) mv (%0d,%0d) sad %0d exp (%0d,%0d) %0d", f, mbx, mby,
                               mv.x, mv.y, sad, r_mvx, r_mvy, r_sad);
        end
        if (f != 1 && m != 1) begin
          checks++;
          if (int'(mv.x) != sxs[f] || int'(mv.y) != sys[f] || sad != 0) begin
            failures++; $display("FAIL f%0d shift not found: (%0d,%0d) sad %0d", f, mv.x, mv.y, sad);
          end
        end
        checks++;
        if (cyc != 444) begin failures++; $display("FAIL search took %0d cycles", cyc); end
        $display("f%0d mb(%0d,%0d) mv (%0d,%0d) sad %0d cycles %0d", f, mbx, mby, int'(mv.x), int'(mv.y), sad, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
