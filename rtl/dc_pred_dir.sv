// dc_pred_dir: AC/DC prediction direction of an intra block.
//
// Blocks A (left), B (above left) and C (above) surround the block X being
// coded. The DC gradients decide the direction: if |DC_A - DC_B| < |DC_B - DC_C|
// the prediction comes from C (vertical), otherwise from A (horizontal). AC
// prediction uses the same direction. The direction also selects the
// coefficient scan: vertical prediction uses the alternate-horizontal scan,
// horizontal prediction the alternate-vertical scan, and a block without AC
// prediction (or any inter block) the zigzag scan. Combinational.
//
// From the published design: the gradient rule and the scan selection. Own choice:
// a tie (equal gradients) predicts from A.
module dc_pred_dir
  import mpeg4_pkg::*;
(
  input  coef_t dc_a,
  input  coef_t dc_b,
  input  coef_t dc_c,
  input  logic  intra,
  input  logic  ac_pred,      // AC prediction enabled for this macroblock
  output logic  from_c,       // 1: predict from C (vertical), 0: from A
  output coef_t dc_pred,      // DC value of the predicting block
  output scan_e scan
);
  logic signed [12:0] gab, gbc;
  logic [12:0] aab, abc;
  always_comb begin
    gab = 13'(dc_a) - 13'(dc_b);
    gbc = 13'(dc_b) - 13'(dc_c);
    aab = (gab < 0) ? 13'(-gab) : 13'(gab);
    abc = (gbc < 0) ? 13'(-gbc) : 13'(gbc);
    from_c  = (aab < abc);
    dc_pred = from_c ? dc_c : dc_a;
    if (!intra || !ac_pred) scan = SCAN_ZIGZAG;
    else if (from_c)        scan = SCAN_ALT_H;
    else                    scan = SCAN_ALT_V;
  end
endmodule
