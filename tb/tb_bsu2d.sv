// tb_bsu2d: self-checking test of the 2-D basic search unit.
// Feeds a 4x4 current block twice (two passes, as in a Level2 search) against
// a random 12-row x 8-column window: Pl carries columns 0..3 of window row r
// in cycles 4r..4r+3, Pr carries columns 4..7 four cycles later. Pass n
// (n = 0, 1) must report, for PE(x,y), sum |C(i,j) - W(i+y+4n, j+x)|. Checks
// every SAD, that each PE reports exactly once per pass, and that the first
// result appears in cycle 16 after the first current pixel.
//
// The expected SADs are computed by direct summation. The PE timing checked
// (one result per cycle, first at cycle 16) is this design's own.
module tb_bsu2d;
  import mpeg4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic c_valid, c_first, c_last;
  pixel_t c_pix, pl_pix, pr_pix;
  logic [1:0] c_col;
  logic [1:0] out_valid;
  sad_t out_sad [2];
  logic [2:0] out_x [2], out_y [2];

  bsu2d dut (.*);

  pixel_t cb [4][4];
  pixel_t w  [12][8];
  int seen [2][5][5];
  int cyc = 0, first_out = -1, t0 = 0;

  function automatic int ref_sad(int n, int x, int y);
    int s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        begin
          int a = int'(cb[i][j]), b = int'(w[i+y+4*n][j+x]);
          s += (a > b) ? a - b : b - a;
        end
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int p = 0; p < 2; p++) if (out_valid[p]) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (out_sad[p] != sad_t'(ref_sad(p, out_x[p], out_y[p]))) begin
        failures++;
        $display("FAIL pass %0d PE(%0d,%0d) sad %0d exp %0d", p, out_x[p], out_y[p], out_sad[p], ref_sad(p, out_x[p], out_y[p]));
      end
      seen[p][out_x[p]][out_y[p]]++;
    end
  end

  initial begin
    for (int t = 0; t < 3; t++) begin
      foreach (cb[i, j]) cb[i][j] = pixel_t'($urandom_range(0, 255));
      foreach (w[i, j])  w[i][j]  = pixel_t'($urandom_range(0, 255));
      foreach (seen[p, x, y]) seen[p][x][y] = 0;
      c_valid = 0; c_first = 0; c_last = 0; c_pix = 0; c_col = 0; pl_pix = 0; pr_pix = 0;
      rst_n = 0; first_out = -1;
      repeat (3) @(posedge clk);
      rst_n <= 1;
      @(negedge clk); // align to cycle 0 of the checker
      t0 = cyc;
      for (int k = 0; k < 64; k++) begin
        c_valid = (k < 32);
        c_pix   = cb[(k/4)%4][k%4];
        c_col   = 2'(k % 4);
        c_first = (k == 0) || (k == 16);
        c_last  = (k == 15) || (k == 31);
        pl_pix  = (k < 48) ? w[k/4][k%4] : 8'd0;
        pr_pix  = (k >= 4 && k < 52) ? w[k/4-1][4 + k%4] : 8'd0;
        @(negedge clk);
      end
      c_valid = 0;
      repeat (40) @(negedge clk);
      foreach (seen[p, x, y]) begin
        checks++;
        if (seen[p][x][y] != 1) begin failures++; $display("FAIL PE(%0d,%0d) pass %0d reported %0d times", x, y, p, seen[p][x][y]); end
      end
      checks++;
      if (first_out - t0 != 16) begin failures++; $display("FAIL first result at cycle %0d, expected 16", first_out - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
