// bsu2d: two-dimensional semi-systolic basic search unit (2DBSU).
//
// A BLK x BLK current block is matched against NPOS x NPOS candidate positions
// of a previous-frame window that is 2*BLK pixels wide. PE(x,y) accumulates
// the SAD of horizontal offset x and vertical offset y (0..NPOS-1; the caller
// subtracts the search range to get a signed vector).
//
// Data flow: the current pixel stream C runs down a
// column of PEs through one register per PE and into the next column through
// a (BLK+1)-cycle delay, so PE(x,y) sees C delayed by (BLK+1)*y + x cycles.
// The previous-frame streams Pl (left half of a window row) and Pr (right
// half, fed BLK cycles after Pl) are broadcast down each column and delayed
// one cycle per column. Each PE takes Pl while its current pixel's column c
// satisfies c + x < BLK and Pr otherwise; row x = 0 always uses Pl and row
// x = NPOS-1 always uses Pr. The mux control is derived from the column index
// that travels with each current pixel instead of separate MC1..MC3 lines.
//
// A pass is a run of current pixels tagged c_first ... c_last (one 4x4 block,
// or a 4-wide strip of 8 or 16 rows). PE(x,y) finishes a pass
// (BLK+1)*y + x cycles after PE(0,0); PE(0,0) presents its SAD the cycle after
// c_last arrives (cycle 16 for a 4x4 pass started at cycle 0). Passes
// alternate a parity tag; results of even and odd passes leave on separate
// ports so two overlapping passes never collide. Within one pass exactly one
// PE finishes per cycle, lane index k = (BLK+1)*y + x.
//
// Interface: c_valid/c_pix/c_col/c_first/c_last, pl_pix, pr_pix (no
// back-pressure); out_valid[p], out_sad[p], out_x[p], out_y[p] for parity p.
// Reset is synchronous to clk, active low.
//
// From the published design: the 5x5 PE array, the 4x4 block and the Pl/Pr
// multiplexer in each PE. Own choices: the multiplexer select comes from the
// column index carried with the current pixel, and the parity-tagged result
// ports that let two passes overlap.
module bsu2d
  import mpeg4_pkg::*;
#(
  parameter int unsigned BLK  = 4,
  parameter int unsigned NPOS = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       c_valid,
  input  pixel_t     c_pix,
  input  logic [$clog2(BLK)-1:0] c_col,
  input  logic       c_first,
  input  logic       c_last,
  input  pixel_t     pl_pix,
  input  pixel_t     pr_pix,
  output logic [1:0] out_valid,
  output sad_t       out_sad [2],
  output logic [$clog2(NPOS)-1:0] out_x [2],
  output logic [$clog2(NPOS)-1:0] out_y [2]
);
  localparam int unsigned NTAP = (BLK + 1) * (NPOS - 1) + NPOS;
  localparam int unsigned CW   = $clog2(BLK);
  localparam int unsigned PW   = $clog2(NPOS);

  typedef struct packed {
    logic          valid;
    pixel_t        pix;
    logic [CW-1:0] col;
    logic          first;
    logic          last;
    logic          par;
  } ctok_t;

  // pass parity toggles at every c_first
  logic par_q;
  logic cur_par;
  assign cur_par = c_first ? ~par_q : par_q;
  always_ff @(posedge clk) begin
    if (!rst_n)                  par_q <= 1'b1;
    else if (c_valid && c_first) par_q <= ~par_q;
  end

  // current-pixel delay line; tap d feeds the PE with delay d
  ctok_t ctap [NTAP];
  assign ctap[0] = '{valid: c_valid, pix: c_pix, col: c_col, first: c_first, last: c_last, par: cur_par};
  always_ff @(posedge clk) begin
    for (int d = 1; d < NTAP; d++) begin
      if (!rst_n) ctap[d] <= '0;
      else        ctap[d] <= ctap[d-1];
    end
  end

  // previous-frame streams, one cycle per column
  pixel_t pl_d [NPOS];
  pixel_t pr_d [NPOS];
  assign pl_d[0] = pl_pix;
  assign pr_d[0] = pr_pix;
  always_ff @(posedge clk) begin
    for (int y = 1; y < NPOS; y++) begin
      pl_d[y] <= pl_d[y-1];
      pr_d[y] <= pr_d[y-1];
    end
  end

  // PE array
  sad_t acc     [NPOS][NPOS];
  sad_t res     [NPOS][NPOS];
  logic done    [NPOS][NPOS];
  logic donepar [NPOS][NPOS];

  for (genvar gy = 0; gy < NPOS; gy++) begin : g_col
    for (genvar gx = 0; gx < NPOS; gx++) begin : g_pe
      localparam int unsigned D = (BLK + 1) * gy + gx;
      ctok_t  t;
      pixel_t p;
      logic [8:0] diff;
      sad_t   acc_n;
      assign t = ctap[D];
      always_comb begin
        p     = ((32'(t.col) + gx) < BLK) ? pl_d[gy] : pr_d[gy];
        diff  = (t.pix >= p) ? {1'b0, t.pix - p} : {1'b0, p - t.pix};
        acc_n = (t.first ? '0 : acc[gx][gy]) + sad_t'(diff);
      end
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          acc[gx][gy]     <= '0;
          res[gx][gy]     <= '0;
          done[gx][gy]    <= 1'b0;
          donepar[gx][gy] <= 1'b0;
        end else begin
          done[gx][gy] <= t.valid && t.last;
          if (t.valid) acc[gx][gy] <= acc_n;
          if (t.valid && t.last) begin
            res[gx][gy]     <= acc_n;
            donepar[gx][gy] <= t.par;
          end
        end
      end
    end
  end

  // SAD/MV bus: at most one PE of each parity finishes per cycle
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      out_valid[p] = 1'b0;
      out_sad[p]   = '0;
      out_x[p]     = '0;
      out_y[p]     = '0;
    end
    for (int y = 0; y < NPOS; y++) begin
      for (int x = 0; x < NPOS; x++) begin
        if (done[x][y]) begin
          out_valid[donepar[x][y]] = 1'b1;
          out_sad[donepar[x][y]]   = res[x][y];
          out_x[donepar[x][y]]     = PW'(x);
          out_y[donepar[x][y]]     = PW'(y);
        end
      end
    end
  end
endmodule
