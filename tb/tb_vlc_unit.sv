// tb_vlc_unit: end-to-end test of the VLC stage. Random intra and inter
// macroblocks are written into the coefficient buffer in raster order, then
// coded while the next macroblock is being written (ping-pong). A table model
// answers header requests with a 10-bit word {mb number, 2'b10} and DC
// requests with an 8-bit word (low byte of the DC value). The 32-bit bitstream
// words are collected with random bus back-pressure, and after the frame flush
// the stream is parsed back: header, DC words and escape-coded symbols must
// give back exactly the coefficients in zigzag order (the zigzag order is
// generated here by walking the anti-diagonals). Also counts RLC FIFO
// back-pressure and packer stalls.
//
// The chain of stages follows the design description. The table model, the
// stall pattern and the flush test are the test's own.
module tb_vlc_unit;
  import mpeg4_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic coef_wr_en = 1'b0, info_wr_en = 1'b0, mb_swap = 1'b0, mb_start = 1'b0;
  logic [2:0] coef_wr_blk = '0;
  logic [5:0] coef_wr_addr = '0;
  coef_t coef_wr_data = '0;
  mb_info_t info_wr = '0;
  logic mb_busy, mb_done;
  logic lut_req, lut_kind, lut_word_valid, lut_done;
  logic [2:0] lut_blk;
  coef_t lut_dc;
  mb_info_t lut_info;
  vlc_word_t lut_word;
  logic frame_flush = 1'b0, flush_done, bs_valid, bs_ready;
  logic [31:0] bs_word;
  logic sym_fire, code_fire, rlc_pause;

  vlc_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NMB = 24;
  coef_t    c [NMB][6][64];   // raster order
  mb_info_t inf [NMB];
  int       zz [64];          // scan position -> raster address
  int       cur_mb = 0;

  // table model
  logic lut_busy = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin lut_word_valid <= 1'b0; lut_done <= 1'b0; lut_busy <= 1'b0; lut_word <= '0; end
    else begin
      lut_word_valid <= 1'b0; lut_done <= 1'b0;
      if (lut_req && !lut_busy && !lut_done) begin
        lut_busy <= 1'b1;
        lut_word_valid <= 1'b1;
        if (!lut_kind) begin lut_word.code <= {22'd0, 8'(cur_mb), 2'b10}; lut_word.len <= 6'd10; end
        else begin lut_word.code <= {24'd0, lut_dc[7:0]}; lut_word.len <= 6'd8; end
      end else if (lut_busy) begin
        lut_busy <= 1'b0; lut_done <= 1'b1;
      end
    end
  end

  // bitstream capture with random back-pressure
  bit bits [$];
  int n_bp = 0, n_afull = 0;
  bit hold_bp = 1'b0;          // stall the output so the flush has to wait
  int n_flush_wait = 0;
  always @(negedge clk) bs_ready = !hold_bp && ($urandom % 3) != 0;
  bit flush_req = 1'b0;         // between frame_flush and flush_done
  always @(posedge clk) begin
    if (frame_flush) flush_req <= 1'b1;
    else if (flush_done) flush_req <= 1'b0;
    if (flush_req && code_fire) n_flush_wait++;
  end
  always @(posedge clk) if (rst_n) begin
    if (bs_valid && bs_ready) for (int i = 31; i >= 0; i--) bits.push_back(bs_word[i]);
    if (bs_valid && !bs_ready) n_bp++;
    if (rlc_pause) n_afull++;
    if (rlc_pause) chk(mb_busy, "pause only while coding");
  end

  function automatic int take(int n);
    int v = 0;
    for (int i = 0; i < n; i++) v = (v << 1) | ((bits.size() > 0) ? int'(bits.pop_front()) : 0);
    return v;
  endfunction

  task automatic write_mb(input int m);
    for (int b = 0; b < 6; b++)
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        coef_wr_en = 1'b1; coef_wr_blk = 3'(b); coef_wr_addr = 6'(a); coef_wr_data = c[m][b][a];
      end
    @(negedge clk);
    coef_wr_en = 1'b0; info_wr_en = 1'b1; info_wr = inf[m];
    @(negedge clk);
    info_wr_en = 1'b0;
  endtask

  initial begin
    int k;
    // zigzag by anti-diagonals
    k = 0;
    for (int s = 0; s < 15; s++)
      if (s % 2 == 0) begin
        for (int r = (s < 8 ? s : 7); r >= 0 && s - r < 8; r--) begin zz[k] = r * 8 + (s - r); k++; end
      end else begin
        for (int r = (s < 8 ? 0 : s - 7); r < 8 && s - r >= 0; r++) begin zz[k] = r * 8 + (s - r); k++; end
      end
    for (int m = 0; m < NMB; m++) begin
      inf[m] = '0;
      inf[m].intra = (m % 4 == 0);
      inf[m].cbp = 6'($urandom);
      if (m == 3) inf[m].cbp = 6'h3f;
      for (int b = 0; b < 6; b++)
        for (int a = 0; a < 64; a++) begin
          int r1, r2;
          r1 = int'($urandom % ((m == 3) ? 1 : 5));
          r2 = int'($urandom % 1000) - 500;
          c[m][b][a] = (r1 == 0) ? coef_t'(r2) : '0;
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // pipeline: write MB m while MB m-1 is coded
    write_mb(0);
    for (int m = 0; m < NMB; m++) begin
      @(negedge clk);
      mb_swap = 1'b1; mb_start = 1'b1; cur_mb = m;
      @(negedge clk);
      mb_swap = 1'b0; mb_start = 1'b0;
      if (m + 1 < NMB) write_mb(m + 1);
      while (mb_busy) @(negedge clk);
    end
    hold_bp = 1'b1;
    @(negedge clk) frame_flush = 1'b1;
    @(negedge clk) frame_flush = 1'b0;
    repeat (20) @(negedge clk);
    hold_bp = 1'b0;
    while (!flush_done) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(bits.size() % 32 == 0, "whole words");
    // parse
    for (int m = 0; m < NMB; m++) begin
      chk(take(10) == ((m % 256) << 2 | 2), $sformatf("header mb %0d", m));
      for (int b = 0; b < 6; b++) begin
        int pos, lastseen;
        if (inf[m].intra) chk(take(8) == int'(c[m][b][0][7:0]), "dc");
        if (!inf[m].cbp[b]) continue;
        pos = inf[m].intra ? 1 : 0;
        // any non-zero coefficient left?
        lastseen = 1;
        for (int p = pos; p < 64; p++) if (c[m][b][zz[p]] != 0) lastseen = 0;
        while (!lastseen) begin
          int esc, lst, rn, lv, mk1, mk2;
          esc = take(9); lst = take(1); rn = take(6); mk1 = take(1); lv = take(12); mk2 = take(1);
          chk(esc == 9'b000001111 && mk1 == 1 && mk2 == 1, "escape form");
          for (int z = 0; z < rn; z++) begin
            chk(c[m][b][zz[pos]] == 0, "run");
            pos++;
          end
          chk(c[m][b][zz[pos]] == coef_t'(lv), $sformatf("level mb %0d blk %0d pos %0d", m, b, pos));
          pos++;
          lastseen = lst;
          if (lst) for (int p = pos; p < 64; p++) chk(c[m][b][zz[p]] == 0, "after last");
          if (pos > 64) begin failures++; lastseen = 1; end
        end
      end
    end
    chk(bits.size() < 32, "no trailing words");
    chk(n_bp > 0, "coverage: bus back-pressure");
    chk(n_afull > 0, "coverage: RLC FIFO almost full");
    chk(n_flush_wait > 0, "coverage: flush waits for the buffer");
    $display("bus stalls %0d, RLC pauses %0d, %0d bits left as padding", n_bp, n_afull, bits.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
