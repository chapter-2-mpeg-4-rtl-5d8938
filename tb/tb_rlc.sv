// tb_rlc: tests the RLC controller / run length coder together with the RLC
// FIFO. A behavioural coefficient store answers rd_blk/rd_pos (already in
// scan order), a table model answers lut_req after a random delay, and a
// consumer pops the FIFO at random. For random intra and inter macroblocks
// with random cbp and sparse coefficients, the sequence of events (header
// request, DC requests with their values, (level, run, last) symbols) is
// compared with a list worked out directly from the coefficients. Also
// checks that done comes once per macroblock and that an all-zero
// coefficient ending a block still marks the block's last symbol.
//
// Run-length coding follows the design description. The table model and its
// delays are the test's own.
module tb_rlc;
  import mpeg4_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  mb_info_t info;
  logic [2:0] rd_blk;
  logic [5:0] rd_pos;
  coef_t rd_data;
  logic wren, last, almost_full, path_idle;
  coef_t level;
  logic [5:0] run;
  logic lut_req, lut_kind, lut_done;
  logic [2:0] lut_blk;
  coef_t lut_dc;

  rlc dut (.*);

  logic f_valid, f_full, f_empty, f_rd;
  rlc_sym_t f_sym;
  rlc_fifo #(.DEPTH(3)) u_fifo (.clk, .rst_n, .wren, .level, .run, .last, .rd(f_rd),
    .valid(f_valid), .sym(f_sym), .full(f_full), .almost_full, .empty(f_empty));

  coef_t coef [6][64];
  assign rd_data = coef[rd_blk][rd_pos];
  assign path_idle = f_empty;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // event log: {kind(2), payload}
  typedef struct packed { logic [1:0] kind; logic last; logic [5:0] run; coef_t level; logic [2:0] blk; } ev_t;
  ev_t got [$];
  ev_t exp [$];

  // consumer
  logic rd_go = 1'b0;
  assign f_rd = rd_go && f_valid;
  always @(negedge clk) rd_go = ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && f_rd) begin
    ev_t e; e = '0; e.kind = 2'd2; e.last = f_sym.last; e.run = f_sym.run; e.level = f_sym.level;
    got.push_back(e);
  end
  // table model
  int lut_wait = 0;
  logic lut_seen = 1'b0;
  always @(posedge clk) begin
    if (!rst_n) begin lut_done <= 1'b0; lut_seen <= 1'b0; end
    else begin
      lut_done <= 1'b0;
      if (lut_req && !lut_seen && !lut_done) begin
        ev_t e; e = '0; e.kind = lut_kind ? 2'd1 : 2'd0; e.blk = lut_blk; e.level = lut_kind ? lut_dc : '0;
        got.push_back(e);
        chk(path_idle, "table request with symbols pending");
        lut_seen <= 1'b1; lut_wait = $urandom % 5;
      end else if (lut_seen) begin
        if (lut_wait == 0) begin lut_done <= 1'b1; lut_seen <= 1'b0; end
        else lut_wait--;
      end
    end
  end

  int n_done = 0, n_zero_end = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    info = '0;
    for (int b = 0; b < 6; b++) for (int p = 0; p < 64; p++) coef[b][p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < 60; mb++) begin
      int lastnz, first;
      info = '0;
      info.intra = mb % 3 == 0;
      info.cbp = 6'($urandom);
      if (mb == 1) info.cbp = '0;
      for (int b = 0; b < 6; b++)
        for (int p = 0; p < 64; p++) begin
          int r1, r2;
          r1 = int'($urandom % 6);
          r2 = int'($urandom % 200) - 100;
          coef[b][p] = (r1 == 0) ? coef_t'(r2) : '0;
          if (mb == 2 && p == 63) coef[b][p] = '0;
          if (mb == 4 && p == 63) coef[b][p] = 12'sd5;
        end
      // expected events
      exp.delete(); got.delete();
      begin ev_t e; e = '0; e.kind = 2'd0; exp.push_back(e); end
      for (int b = 0; b < 6; b++) begin
        int zeros;
        if (info.intra) begin ev_t e; e = '0; e.kind = 2'd1; e.blk = 3'(b); e.level = coef[b][0]; exp.push_back(e); end
        if (!info.cbp[b]) continue;
        first = info.intra ? 1 : 0;
        lastnz = -1;
        for (int p = first; p < 64; p++) if (coef[b][p] != 0) lastnz = p;
        if (coef[b][63] == 0 && lastnz != -1) n_zero_end = n_zero_end + 1;
        zeros = 0;
        for (int p = first; p < 64; p++) begin
          if (coef[b][p] != 0) begin
            ev_t e; e = '0; e.kind = 2'd2; e.level = coef[b][p]; e.run = 6'(zeros); e.last = (p == lastnz);
            exp.push_back(e);
            zeros = 0;
          end else zeros++;
        end
      end
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (done);
      @(negedge clk);
      chk(got.size() == exp.size(), $sformatf("event count %0d/%0d mb %0d", got.size(), exp.size(), mb));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == exp[i], $sformatf("event %0d mb %0d", i, mb));
    end
    repeat (5) @(negedge clk);
    chk(n_done == 60, "done count");
    $display("blocks ending in zeros: %0d, macroblocks done: %0d", n_zero_end, n_done);
    chk(n_zero_end > 0, "coverage: block ending in zeros");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
