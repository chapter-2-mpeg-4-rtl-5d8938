// tb_mc_unit: self-checking test of motion compensation.
// A random reference frame (64x48 luma, 32x24 chroma, reads clamped at the
// edge) is served through a one-cycle-latency port. For vectors with even and
// odd components the test fills the current MB, starts compensation, and
// checks every residue against cur - pred, pred being the whole-pixel luma
// sample or the bilinear half-pixel chroma value computed here, and the fetch
// time (769 cycles from start to done). It then swaps banks and checks the
// MC add: IDCT value + stored prediction, clipped, and the intra case.
//
// The bilinear chroma rule follows the design description. The 769-cycle
// fetch length checked here is this design's own.
module tb_mc_unit;
  import mpeg4_pkg::*;
  localparam int W = 64, H = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cur_wr_en = 0, start = 0, mb_swap = 0, idct_valid = 0, idct_intra = 0;
  logic [8:0] cur_wr_addr = 0, idct_idx = 0, res_idx, recon_idx;
  pixel_t cur_wr_data = 0, ref_rd_data, recon_data;
  logic [4:0] mb_x = 0, mb_y = 0;
  mv_t mv = '0;
  logic busy, done, ref_rd_en, res_valid, recon_valid;
  logic [1:0] ref_rd_plane;
  logic signed [10:0] ref_rd_x, ref_rd_y;
  logic signed [8:0] res_data, idct_data = 0;

  mc_unit dut (.*);

  pixel_t fr [3][H][W];
  pixel_t cur [384];
  int pred [384];
  int nres, cyc;

  function automatic int px(int pl, int x, int y);
    int w = (pl == 0) ? W : W / 2, h = (pl == 0) ? H : H / 2;
    if (x < 0) x = 0; if (x > w - 1) x = w - 1;
    if (y < 0) y = 0; if (y > h - 1) y = h - 1;
    return fr[pl][y][x];
  endfunction
  always_ff @(posedge clk) if (ref_rd_en) ref_rd_data <= pixel_t'(px(int'(ref_rd_plane), int'(ref_rd_x), int'(ref_rd_y)));

  always @(posedge clk) if (rst_n && res_valid) begin
    checks++; nres++;
    if (int'(res_data) != int'(cur[res_idx]) - pred[res_idx]) begin
      failures++; $display("FAIL residue %0d: %0d exp %0d", res_idx, res_data, int'(cur[res_idx]) - pred[res_idx]);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mvs [4][2] = '{'{0, 0}, '{3, -5}, '{-6, 1}, '{7, 7}};
    foreach (fr[p, y, x]) fr[p][y][x] = pixel_t'($urandom_range(0, 255));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 4; t++) begin
      int mx, my, cxi, cyi, hx, hy;
      mx = mvs[t][0]; my = mvs[t][1];
      mb_x = 5'(1 + t % 2); mb_y = 5'(1);
      cxi = mx >>> 1; cyi = my >>> 1; hx = mx & 1; hy = my & 1;
      for (int i = 0; i < 384; i++) begin
        cur[i] = pixel_t'($urandom_range(0, 255));
        if (i < 256) pred[i] = px(0, 16 * mb_x + i % 16 + mx, 16 * mb_y + i / 16 + my);
        else begin
          int pl, j, x, y;
          pl = (i < 320) ? 1 : 2; j = i % 64;
          x = 8 * mb_x + j % 8 + cxi; y = 8 * mb_y + j / 8 + cyi;
          pred[i] = (px(pl, x, y) + px(pl, x + hx, y) + px(pl, x, y + hy) + px(pl, x + hx, y + hy) + 2) / 4;
        end
      end
      for (int i = 0; i < 384; i++) begin
        @(negedge clk); cur_wr_en = 1; cur_wr_addr = 9'(i); cur_wr_data = cur[i];
      end
      @(negedge clk); cur_wr_en = 0;
      mv.x = mvc_t'(mx); mv.y = mvc_t'(my); start = 1; nres = 0; cyc = 0;
      @(negedge clk); start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc != 769 || nres != 384) begin failures++; $display("FAIL fetch %0d cycles, %0d residues", cyc, nres); end
      // next MB slot: the stored prediction is now in the bank the adder reads
      @(negedge clk); mb_swap = 1; @(negedge clk); mb_swap = 0;
      for (int i = 0; i < 384; i++) begin
        int d, e;
        d = $urandom_range(0, 511) - 256;
        idct_intra = (t == 2);
        idct_valid = 1; idct_idx = 9'(i); idct_data = 9'(d);
        e = d + (idct_intra ? 0 : pred[i]);
        e = (e < 0) ? 0 : (e > 255) ? 255 : e;
        @(negedge clk);
        checks++;
        if (!recon_valid || recon_idx != 9'(i) || int'(recon_data) != e) begin
          failures++; $display("FAIL recon %0d: %0d exp %0d", i, recon_data, e);
        end
      end
      idct_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
