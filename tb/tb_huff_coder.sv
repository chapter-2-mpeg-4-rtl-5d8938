// tb_huff_coder: drives random (last, run, level) symbols with random valid
// and output back-pressure, and checks each code word field by field against
// the escape type 3 layout: 0000011 11 last run(6) 1 level(12) 1, 30 bits.
// Also checks the one-cycle latency and that no symbol is lost or repeated.
//
// The escape type 3 layout follows the MPEG-4 syntax. The random stimulus is
// the test's own.
module tb_huff_coder;
  import mpeg4_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_rd, out_valid, out_ready = 1'b0;
  rlc_sym_t in_sym = '0;
  vlc_word_t out_word;
  int checks = 0, failures = 0;
  huff_coder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rlc_sym_t sent [$];
  int n_out = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_rd) sent.push_back(in_sym);
    if (out_valid && out_ready) begin
      rlc_sym_t s;
      s = sent.pop_front();
      n_out++;
      chk(out_word.len == 6'd30, "length");
      chk(out_word.code[31:30] == 2'b00, "alignment");
      chk(out_word.code[29:23] == 7'b0000011, "escape");
      chk(out_word.code[22:21] == 2'b11, "type 3");
      chk(out_word.code[20] == s.last, "last");
      chk(out_word.code[19:14] == s.run, "run");
      chk(out_word.code[13] && out_word.code[0], "marker bits");
      chk($signed(out_word.code[12:1]) == s.level, "level");
    end
    if (out_valid && !out_ready) n_stall++;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // latency: one symbol into an idle coder
    @(negedge clk);
    in_valid = 1'b1; in_sym = '{last: 1'b1, run: 6'd3, level: -12'sd7}; out_ready = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    chk(out_valid, "one-cycle latency");
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      in_valid  = $urandom % 2;
      in_sym.last  = 1'($urandom);
      in_sym.run   = 6'($urandom);
      in_sym.level = coef_t'($urandom);
      out_ready = ($urandom % 3) != 0;
      @(negedge clk);
    end
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (4) @(negedge clk);
    chk(sent.size() == 0, "all symbols coded");
    chk(n_stall > 0, "coverage: back-pressure");
    $display("coded %0d symbols, %0d stalled cycles", n_out, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
