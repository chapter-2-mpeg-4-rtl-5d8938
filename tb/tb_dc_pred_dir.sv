// tb_dc_pred_dir: self-checking test of the AC/DC prediction direction.
// Random and hand-picked DC triples (including equal gradients, where the
// prediction must come from A) are compared with the gradient rule and the
// direction-to-scan mapping written out here.
//
// The gradient rule and the scan choice follow the design description. The
// tie case is this design's own choice.
module tb_dc_pred_dir;
  import mpeg4_pkg::*;
  int checks = 0, failures = 0;
  coef_t dc_a, dc_b, dc_c, dc_pred;
  logic intra, ac_pred, from_c;
  scan_e scan;

  dc_pred_dir dut (.*);

  task automatic check(int a, int b, int c, bit in, bit ap);
    int ga, gc;
    bit fc;
    scan_e es;
    dc_a = coef_t'(a); dc_b = coef_t'(b); dc_c = coef_t'(c); intra = in; ac_pred = ap;
    #1;
    ga = (a - b < 0) ? b - a : a - b;
    gc = (b - c < 0) ? c - b : b - c;
    fc = (ga < gc);
    es = (!in || !ap) ? SCAN_ZIGZAG : fc ? SCAN_ALT_H : SCAN_ALT_V;
    checks++;
    if (from_c != fc || int'(dc_pred) != (fc ? c : a) || scan != es) begin
      failures++; $display("FAIL a=%0d b=%0d c=%0d: from_c %0d scan %0d", a, b, c, from_c, scan);
    end
  endtask

  initial begin
    check(100, 100, 100, 1, 1);   // equal: from A
    check(100, 110, 200, 1, 1);   // |A-B| = 10 < |B-C| = 90: from C
    check(300, 100, 110, 1, 1);   // from A
    check(-2048, 2047, -2048, 1, 1);
    check(100, 110, 200, 0, 1);
    check(100, 110, 200, 1, 0);
    for (int i = 0; i < 500; i++)
      check($urandom_range(0, 4095) - 2048, $urandom_range(0, 4095) - 2048, $urandom_range(0, 4095) - 2048,
            1'($urandom_range(0, 1)), 1'($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
