// tb_vlc_coef_buffer: self-checking test of the coefficient ping-pong buffer.
// The expected orders are the three printed scan grids (scan position at each
// raster place). A random macroblock is written in raster order into one bank
// while the other bank, written the slot before, is read in scan order with
// per-block scan selection; every coefficient and the side information are
// compared. Several slots check the bank alternation.
//
// The scan grids and the bit exchange for alternate-vertical follow the
// design description.
module tb_vlc_coef_buffer;
  import mpeg4_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic swap = 0, wr_en = 0, info_wr_en = 0;
  logic [2:0] wr_blk = 0, rd_blk = 0;
  logic [5:0] wr_addr = 0, rd_pos = 0;
  coef_t wr_data = 0, rd_data;
  mb_info_t info_wr = '0, rd_info;

  vlc_coef_buffer dut (.*);

  // scan position at raster address, as printed
  int g_ah [64] = '{0, 1, 2, 3, 10, 11, 12, 13, 4, 5, 8, 9, 17, 16, 15, 14, 6, 7, 19, 18, 26, 27, 28, 29, 20, 21, 24, 25, 30, 31, 32, 33, 22, 23, 34, 35, 42, 43, 44, 45, 36, 37, 40, 41, 46, 47, 48, 49, 38, 39, 50, 51, 56, 57, 58, 59, 52, 53, 54, 55, 60, 61, 62, 63};
  int g_av [64] = '{0, 4, 6, 20, 22, 36, 38, 52, 1, 5, 7, 21, 23, 37, 39, 53, 2, 8, 19, 24, 34, 40, 50, 54, 3, 9, 18, 25, 35, 41, 51, 55, 10, 17, 26, 30, 42, 46, 56, 60, 11, 16, 27, 31, 43, 47, 57, 61, 12, 15, 28, 32, 44, 48, 58, 62, 13, 14, 29, 33, 45, 49, 59, 63};
  int g_zz [64] = '{0, 1, 5, 6, 14, 15, 27, 28, 2, 4, 7, 13, 16, 26, 29, 42, 3, 8, 12, 17, 25, 30, 41, 43, 9, 11, 18, 24, 31, 40, 44, 53, 10, 19, 23, 32, 39, 45, 52, 54, 20, 22, 33, 38, 46, 51, 55, 60, 21, 34, 37, 47, 50, 56, 59, 61, 35, 36, 48, 49, 57, 58, 62, 63};

  coef_t mbc [2][6][64];
  mb_info_t inf [2];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int slot = 0; slot < 5; slot++) begin
      int wb;
      wb = slot % 2;
      foreach (mbc[wb][b, a]) mbc[wb][b][a] = coef_t'($urandom_range(0, 4095));
      inf[wb].intra = 1'($urandom_range(0, 1));
      inf[wb].cbp   = 6'($urandom_range(0, 63));
      for (int b = 0; b < 6; b++) inf[wb].scan[b] = scan_e'($urandom_range(0, 2));
      inf[wb].mvd   = mv_t'($urandom_range(0, 16383));
      @(negedge clk);
      info_wr_en = 1; info_wr = inf[wb];
      @(negedge clk);
      info_wr_en = 0;
      for (int b = 0; b < 6; b++)
        for (int a = 0; a < 64; a++) begin
          wr_en = 1; wr_blk = 3'(b); wr_addr = 6'(a); wr_data = mbc[wb][b][a];
          if (slot > 0) begin
            // read side: previous slot's bank, in scan order
            int rb, exp_a;
            rb = 1 - wb;
            rd_blk = 3'(b); rd_pos = 6'(a);
            #1;
            exp_a = -1;
            for (int k = 0; k < 64; k++) begin
              int sp;
              case (inf[rb].scan[b])
                SCAN_ALT_H: sp = g_ah[k];
                SCAN_ALT_V: sp = g_av[k];
                default:    sp = g_zz[k];
              endcase
              if (sp == a) exp_a = k;
            end
            checks++;
            if (rd_data != mbc[rb][b][exp_a]) begin
              failures++; $display("FAIL slot %0d blk %0d pos %0d scan %0d", slot, b, a, inf[rb].scan[b]);
            end
            if (a == 0) begin
              checks++;
              if (rd_info != inf[rb]) begin failures++; $display("FAIL info slot %0d", slot); end
            end
          end
          @(negedge clk);
        end
      wr_en = 0;
      swap = 1; @(negedge clk); swap = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
