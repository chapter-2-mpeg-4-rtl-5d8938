// tb_packer: random code words of 1 to 32 bits with random output
// back-pressure. A bit-queue model appends each code word MSB first; every
// 32-bit output word must equal the next 32 bits of the queue. After the
// stream a flush must emit the residue padded with zeros (and nothing when the
// residue is empty). Also checks that, with the output always ready, one code
// word is accepted every cycle.
//
// MSB-first packing follows the design description. The zero padding at
// flush is this design's own choice.
module tb_packer;
  import mpeg4_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, flush = 1'b0, flush_done, out_valid, out_ready = 1'b1;
  vlc_word_t in_word = '0;
  logic [31:0] out_word;
  int checks = 0, failures = 0;
  packer dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bits [$];
  int n_words = 0, n_full_rate = 0, n_busy = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready)
      for (int i = 32'(in_word.len) - 1; i >= 0; i--) bits.push_back(in_word.code[i]);
    if (out_valid && out_ready) begin
      logic [31:0] e;
      for (int i = 31; i >= 0; i--) e[i] = (bits.size() > 0) ? bits.pop_front() : 1'b0;
      chk(out_word == e, "word");
      n_words++;
    end
  end

  task automatic send(input int n, input bit rand_ready);
    for (int i = 0; i < n; i++) begin
      int len;
      len = 1 + int'($urandom % 32);
      in_valid = 1'b1;
      in_word.len  = 6'(len);
      in_word.code = (len == 32) ? $urandom : ($urandom & ((32'd1 << len) - 1));
      out_ready = rand_ready ? (($urandom % 4) != 0) : 1'b1;
      @(negedge clk);
      while (!in_ready) begin
        n_busy++;
        out_ready = rand_ready ? (($urandom % 4) != 0) : 1'b1;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  task automatic do_flush();
    out_ready = 1'b1;
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    while (!flush_done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // full rate with a ready output: 1000 words in 1000 cycles
    t0 = n_busy;
    send(1000, 1'b0);
    chk(n_busy == t0, "one code word per cycle");
    do_flush();
    chk(bits.size() == 0, "flush emptied the residue");
    // random back-pressure
    for (int k = 0; k < 10; k++) begin
      send(300, 1'b1);
      do_flush();
      chk(bits.size() == 0, "flush emptied the residue");
    end
    // flush with nothing pending emits nothing
    t0 = n_words;
    do_flush();
    chk(n_words == t0, "empty flush");
    chk(n_busy > 0, "coverage: back-pressure");
    $display("%0d words, %0d stalled code words", n_words, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
