// mc_unit: motion compensation part of the motion unit.
//
// Holds the current macroblock ("MC current MB", written from the data bus
// while the motion estimator is fed, so it is not loaded twice) and a
// ping-pong pair of predicted macroblocks ("MC previous MB"). After a motion
// vector is found, the MC controller fetches the prediction from the reference
// frame, the MC interpolator forms it, it is stored in the write bank and
// subtracted from the current MB; the residue goes to the DCT buffer. In the
// same time slot the IDCT output of the previous MB is added to the other
// bank (MC add) and clipped to 0..255 to give the reconstructed pixels.
//
// Macroblock layout (384 bytes, index = address): Y 16x16 raster at 0..255,
// U 8x8 at 256..319, V 8x8 at 320..383.
// Luma vectors are whole pixels, so Y is one read per pixel. The chroma
// vector is the luma vector in chroma half pixels: integer part mv>>1, half
// flag mv&1. Each chroma pixel is the bilinear value
// (a + b + c + d + 2) >> 2 of its four neighbours a=(x,y), b=(x+hx,y),
// c=(x,y+hy), d=(x+hx,y+hy), read one per cycle; with no half offset this
// reduces to a, with one offset to (a + b + 1) >> 1.
//
// Timing: the reference-frame port returns data one cycle after the address.
// Fetch and subtract of one MB takes 256 + 4*128 = 768 cycles plus 1; each
// residue leaves 1 cycle after its last read returns. A reconstructed pixel
// leaves 1 cycle after its IDCT value enters. mb_swap exchanges the banks.
//
// From the published design: the units (controller, bilinear interpolator, current
// MB, ping-pong previous MB, subtract and add). Own choices: the MB layout,
// the read schedule and the clipping.
// Lint note: r[1:0] is unused. Those two bits are shifted out by the rounding
// >> 2, so the warning stays.
module mc_unit
  import mpeg4_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // current MB fill
  input  logic        cur_wr_en,
  input  logic [8:0]  cur_wr_addr,
  input  pixel_t      cur_wr_data,
  // compensation request
  input  logic        start,
  input  logic [4:0]  mb_x,
  input  logic [4:0]  mb_y,
  input  mv_t         mv,
  output logic        busy,
  output logic        done,
  input  logic        mb_swap,
  // reference frame read port (plane 0: Y, 1: U, 2: V)
  output logic        ref_rd_en,
  output logic [1:0]  ref_rd_plane,
  output logic signed [10:0] ref_rd_x,
  output logic signed [10:0] ref_rd_y,
  input  pixel_t      ref_rd_data,
  // residue to the DCT buffer
  output logic        res_valid,
  output logic [8:0]  res_idx,
  output logic signed [8:0] res_data,
  // MC add
  input  logic        idct_valid,
  input  logic        idct_intra,     // intra MB: no prediction is added
  input  logic [8:0]  idct_idx,
  input  logic signed [8:0] idct_data,
  output logic        recon_valid,
  output logic [8:0]  recon_idx,
  output pixel_t      recon_data
);
  pixel_t cur_mb [384];
  pixel_t prev_mb [2][384];
  logic   wbank;

  always_ff @(posedge clk) if (cur_wr_en) cur_mb[cur_wr_addr] <= cur_wr_data;

  always_ff @(posedge clk) begin
    if (!rst_n)       wbank <= 1'b0;
    else if (mb_swap) wbank <= ~wbank;
  end

  // ---------------- MC controller: address generation ----------------
  logic [8:0] idx;
  logic [1:0] sub;
  logic       run;
  logic       chroma;
  logic [2:0] cx, cy;
  logic [3:0] yx, yy;
  logic signed [6:0] cix, ciy;
  logic       hx, hy;
  assign chroma = idx[8];
  assign yx = idx[3:0];
  assign yy = idx[7:4];
  assign cx = idx[2:0];
  assign cy = idx[5:3];
  assign cix = mv.x >>> 1;
  assign ciy = mv.y >>> 1;
  assign hx  = mv.x[0];
  assign hy  = mv.y[0];

  always_comb begin
    ref_rd_en    = run;
    ref_rd_plane = chroma ? (idx[6] ? 2'd2 : 2'd1) : 2'd0;
    if (!chroma) begin
      ref_rd_x = (11'(mb_x) <<< 4) + 11'(yx) + 11'(mv.x);
      ref_rd_y = (11'(mb_y) <<< 4) + 11'(yy) + 11'(mv.y);
    end else begin
      ref_rd_x = (11'(mb_x) <<< 3) + 11'(cx) + 11'(cix) + ((sub[0] && hx) ? 11'sd1 : 11'sd0);
      ref_rd_y = (11'(mb_y) <<< 3) + 11'(cy) + 11'(ciy) + ((sub[1] && hy) ? 11'sd1 : 11'sd0);
    end
  end

  logic last_read;
  assign last_read = !chroma || (sub == 2'd3);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; idx <= '0; sub <= '0;
    end else if (start && !run) begin
      run <= 1'b1; idx <= '0; sub <= '0;
    end else if (run) begin
      sub <= last_read ? 2'd0 : sub + 2'd1;
      if (last_read) begin
        idx <= idx + 9'd1;
        if (idx == 9'd383) run <= 1'b0;
      end
    end
  end

  // ---------------- MC interpolator ----------------
  logic       d_valid, d_last, d_chroma;
  logic [8:0] d_idx;
  logic [9:0] acc;
  logic [9:0] sum4;
  pixel_t     pred;
  always_ff @(posedge clk) begin
    if (!rst_n) d_valid <= 1'b0;
    else        d_valid <= run;
    d_last   <= last_read;
    d_chroma <= chroma;
    d_idx    <= idx;
  end
  assign sum4 = acc + 10'(ref_rd_data);
  always_comb begin
    logic [9:0] r;
    r    = sum4 + 10'd2;
    pred = d_chroma ? r[9:2] : ref_rd_data;
  end
  always_ff @(posedge clk) begin
    if (!rst_n)                  acc <= '0;
    else if (d_valid && d_last)  acc <= '0;
    else if (d_valid)            acc <= sum4;
  end

  // ---------------- store and MC subtract ----------------
  always_ff @(posedge clk) begin
    if (d_valid && d_last) prev_mb[wbank][d_idx] <= pred;
    if (!rst_n) begin
      res_valid <= 1'b0; done <= 1'b0;
    end else begin
      res_valid <= d_valid && d_last;
      done      <= d_valid && d_last && d_idx == 9'd383;
    end
    res_idx  <= d_idx;
    res_data <= 9'(signed'({1'b0, cur_mb[d_idx]})) - 9'(signed'({1'b0, pred}));
  end
  assign busy = run || d_valid;

  // ---------------- MC add ----------------
  always_ff @(posedge clk) begin
    logic signed [10:0] s;
    s = 11'(idct_data) + (idct_intra ? 11'sd0 : 11'(signed'({1'b0, prev_mb[~wbank][idct_idx]})));
    if (!rst_n) recon_valid <= 1'b0;
    else        recon_valid <= idct_valid;
    recon_idx  <= idct_idx;
    recon_data <= (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : s[7:0];
  end
endmodule
