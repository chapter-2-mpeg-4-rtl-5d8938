// tb_rlc_fifo: random test of the RLC symbol FIFO against a queue model.
// Symbols are written with random levels and runs, Last strobes come at
// random times (with or without a write in the same cycle) and reads are
// random. Every cycle valid, empty, full, almost_full and the head symbol are
// compared with the model, whose rule is: the head may leave when at least two
// symbols are held, or when it is the only one and carries Last.
//
// The late Last flag and the two-symbol rule follow the design description.
// The single-symbol-with-Last case is this design's own addition.
module tb_rlc_fifo;
  import mpeg4_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wren = 1'b0, last = 1'b0, rd = 1'b0;
  coef_t level = '0;
  logic [5:0] run = '0;
  logic valid, full, almost_full, empty;
  rlc_sym_t sym;
  int checks = 0, failures = 0;

  rlc_fifo #(.DEPTH(3)) dut (.*);

  rlc_sym_t q [$];
  int n_lastonly = 0, n_holdback = 0, n_full = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t q=%0d valid=%0d sym=%p q0=%p", what, $time, q.size(), valid, sym, q.size() ? q[0] : sym); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit mvalid;
    bit do_rd, do_wr;
    rlc_sym_t s;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // compare outputs with the model
      mvalid = (q.size() >= 2) || (q.size() == 1 && q[0].last);
      chk(valid == mvalid, "valid");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 3), "full");
      chk(almost_full == (q.size() >= 2), "almost_full");
      if (mvalid) chk(sym == q[0], "head");
      if (q.size() == 1 && !q[0].last) n_holdback++;
      if (q.size() == 3) n_full++;
      // next inputs
      rd    = ($urandom % 3) != 0;
      do_rd = rd && mvalid;
      wren  = ($urandom % 2) && (q.size() < 3 || do_rd);
      last  = ($urandom % 5) == 0;
      level = coef_t'($urandom);
      run   = 6'($urandom);
      do_wr = wren;
      // model update (as of the coming clock edge)
      if (do_rd) void'(q.pop_front());
      if (do_wr) begin
        s.level = level; s.run = run; s.last = last;
        q.push_back(s);
      end else if (last && q.size() > 0) begin
        if (!q[$].last && q.size() == 1) n_lastonly++;
        q[$].last = 1'b1;
      end
    end
    chk(n_lastonly > 0 && n_holdback > 0 && n_full > 0, "coverage");
    $display("late Last strobes %0d, held back %0d, full %0d", n_lastonly, n_holdback, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
