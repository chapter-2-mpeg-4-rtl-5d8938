// tb_downsample_unit: self-checking test of the frame downsampler.
// Streams three 4-row loops of a random 352-pixel-wide image, one 32-bit word
// per cycle, and compares every Level1 and Level2 word written (and the RAM2,
// RAM3, RAM5 contents read back after the last loop) with the floor-of-mean
// filter computed here. Also checks the word counts and that loop_done comes
// 4 cycles after the last input word of each loop.
//
// The filter (floor of the 2x2 mean) and the loop count follow the design
// description. The expected words come from a direct model.
module tb_downsample_unit;
  localparam int W = 352, ROWS = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start = 0, in_valid = 0;
  logic [31:0] in_word = 0;
  logic l1_wr_en, l1_wr_row, l2_wr_en, loop_done, l1_rd_row = 0;
  logic [5:0] l1_wr_addr, l1_rd_addr = 0;
  logic [4:0] l2_wr_addr, l2_rd_addr = 0;
  logic [31:0] l1_wr_data, l2_wr_data, l1_rd_data, l2_rd_data;

  downsample_unit #(.IMG_W(W)) dut (.*);

  logic [7:0] img [ROWS][W];
  logic [7:0] l1 [ROWS/2][W/2];
  logic [7:0] l2 [ROWS/4][W/4];
  int loop_i = 0, n1 = 0, n2 = 0, cyc = 0, last_in = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] l1w(int r, int a);
    return {l1[r][4*a+3], l1[r][4*a+2], l1[r][4*a+1], l1[r][4*a]};
  endfunction
  function automatic logic [31:0] l2w(int r, int a);
    return {l2[r][4*a+3], l2[r][4*a+2], l2[r][4*a+1], l2[r][4*a]};
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && l1_wr_en) begin
      checks++; n1++;
      if (l1_wr_data != l1w(2 * loop_i + int'(l1_wr_row), int'(l1_wr_addr))) begin
        failures++; $display("FAIL L1 loop %0d row %0d addr %0d: %h exp %h at %0d", loop_i, l1_wr_row, l1_wr_addr, l1_wr_data, l1w(2 * loop_i + int'(l1_wr_row), int'(l1_wr_addr)), cyc);
      end
    end
    if (rst_n && l2_wr_en) begin
      checks++; n2++;
      if (l2_wr_data != l2w(loop_i, int'(l2_wr_addr))) begin
        failures++; $display("FAIL L2 loop %0d addr %0d: %h exp %h", loop_i, l2_wr_addr, l2_wr_data, l2w(loop_i, int'(l2_wr_addr)));
      end
    end
    if (rst_n && loop_done) begin
      checks++;
      if (cyc - last_in != 4) begin failures++; $display("FAIL loop_done %0d cycles after last input", cyc - last_in); end
      loop_i++;
    end
  end

  initial begin
    foreach (img[r, c]) img[r][c] = 8'($urandom_range(0, 255));
    foreach (l1[r, c]) l1[r][c] = 8'((int'(img[2*r][2*c]) + img[2*r][2*c+1] + img[2*r+1][2*c] + img[2*r+1][2*c+1]) / 4);
    foreach (l2[r, c]) l2[r][c] = 8'((int'(l1[2*r][2*c]) + l1[2*r][2*c+1] + l1[2*r+1][2*c] + l1[2*r+1][2*c+1]) / 4);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    frame_start = 1; @(negedge clk); frame_start = 0;
    for (int r = 0; r < ROWS; r++)
      for (int a = 0; a < W / 4; a++) begin
        in_valid = 1;
        in_word = {img[r][4*a+3], img[r][4*a+2], img[r][4*a+1], img[r][4*a]};
        if (r % 4 == 3 && a == W / 4 - 1) last_in = cyc;
        @(negedge clk);
        // an idle cycle now and then
        if (a % 29 == 7 && r % 4 != 3) begin in_valid = 0; @(negedge clk); end
      end
    in_valid = 0;
    repeat (10) @(negedge clk);
    for (int a = 0; a < W / 8; a++) begin
      l1_rd_row = 0; l1_rd_addr = 6'(a); #1;
      checks++; if (l1_rd_data != l1w(ROWS/2 - 2, a)) begin failures++; $display("FAIL RAM2[%0d]", a); end
      l1_rd_row = 1; #1;
      checks++; if (l1_rd_data != l1w(ROWS/2 - 1, a)) begin failures++; $display("FAIL RAM3[%0d]", a); end
    end
    for (int a = 0; a < W / 16; a++) begin
      l2_rd_addr = 5'(a); #1;
      checks++; if (l2_rd_data != l2w(ROWS/4 - 1, a)) begin failures++; $display("FAIL RAM5[%0d]", a); end
    end
    checks++;
    if (n1 != ROWS / 2 * W / 8 || n2 != ROWS / 4 * W / 16 || loop_i != ROWS / 4) begin
      failures++; $display("FAIL counts L1 %0d L2 %0d loops %0d", n1, n2, loop_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
