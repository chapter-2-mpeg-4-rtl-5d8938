// tb_mb_downsampler: self-checking test of the macroblock downsampler.
// Sends random macroblocks (Y1..Y4, U, V rows, with gaps) and compares every
// Level1 word and the Level2 macroblock read back after l2_ready with the
// floor-of-mean filter computed here. Checks the Level1 word latency (2
// cycles after the odd row) and the l2_ready latency (4 cycles after Y4 row 7).
//
// The filter follows the design description. The row order of the input is
// this design's own choice.
module tb_mb_downsampler;
  import mpeg4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [2:0] in_blk = 0, in_row = 0, l1_y;
  pixel_t in_pix [8];
  logic l1_valid, l1_x4, l2_ready;
  logic [31:0] l1_word, l2_rd_data;
  logic [1:0] l2_rd_addr = 0;

  mb_downsampler dut (.*);

  pixel_t mb [16][16];
  pixel_t l1 [8][8];
  pixel_t l2 [4][4];
  int t_odd [4][4];
  int cyc = 0, last_y4 = 0, n1 = 0, nready = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && l1_valid) begin
      int y, x, dt;
      y = l1_y; x = l1_x4 ? 4 : 0;
      dt = cyc - t_odd[2 * (y / 4) + x / 4][y % 4];
      checks++; n1++;
      if (l1_word != {l1[y][x+3], l1[y][x+2], l1[y][x+1], l1[y][x]} || dt != 2) begin
        failures++; $display("FAIL L1 row %0d x %0d: %h after %0d", y, x, l1_word, dt);
      end
    end
    if (rst_n && l2_ready) begin
      checks++; nready++;
      if (cyc - last_y4 != 4) begin failures++; $display("FAIL l2_ready after %0d", cyc - last_y4); end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) in_pix[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      foreach (mb[r, c]) mb[r][c] = pixel_t'($urandom_range(0, 255));
      if (m == 3) foreach (mb[r, c]) mb[r][c] = 8'hff;
      foreach (l1[r, c]) l1[r][c] = pixel_t'((int'(mb[2*r][2*c]) + mb[2*r][2*c+1] + mb[2*r+1][2*c] + mb[2*r+1][2*c+1]) / 4);
      foreach (l2[r, c]) l2[r][c] = pixel_t'((int'(l1[2*r][2*c]) + l1[2*r][2*c+1] + l1[2*r+1][2*c] + l1[2*r+1][2*c+1]) / 4);
      @(negedge clk);
      for (int b = 0; b < 6; b++)
        for (int r = 0; r < 8; r++) begin
          in_valid = 1; in_blk = 3'(b); in_row = 3'(r);
          for (int i = 0; i < 8; i++)
            in_pix[i] = (b < 4) ? mb[8 * (b / 2) + r][8 * (b % 2) + i] : pixel_t'($urandom_range(0, 255));
          if (r % 2 == 1 && b < 4) t_odd[b][r/2] = cyc;
          if (b == 3 && r == 7) last_y4 = cyc;
          @(negedge clk);
          if (r == 3) begin in_valid = 0; @(negedge clk); end
        end
      in_valid = 0;
      repeat (6) @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        l2_rd_addr = 2'(r); #1;
        checks++;
        if (l2_rd_data != {l2[r][3], l2[r][2], l2[r][1], l2[r][0]}) begin
          failures++; $display("FAIL L2 row %0d: %h", r, l2_rd_data);
        end
      end
    end
    checks++;
    if (n1 != 4 * 16 || nready != 4) begin failures++; $display("FAIL counts %0d %0d", n1, nready); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
