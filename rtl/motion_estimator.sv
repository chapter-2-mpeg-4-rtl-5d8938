// motion_estimator: three-level hierarchical block-matching motion estimator.
//
// One 16x16 macroblock (MB) at (mb_x, mb_y) is searched over +-22 pixels in
// three steps, all on the same hardware:
//   Level2 (1/4 resolution): the 4x4 current block is fully searched over
//     +-4 in a 12x12 window; the two best vectors are kept as candidates.
//   Level1 (1/2 resolution): around each candidate (scaled by 2) the 8x8
//     block is fully searched over +-2 in a 12x12 window; the best of the
//     50 positions is kept.
//   Level0 (full resolution): around that vector (scaled by 2) the 16x16
//     block is fully searched over +-2 in a 20x20 window.
// The final vector is 4*mv2 + 2*d1 + d0 (all in full-resolution pixels).
//
// Datapath: two 2DBSUs. BSU0 takes Current1, Previous1
// (Pl0) and Previous2 delayed 4 cycles (Pr0); BSU1 takes Current1 (Level2) or
// Current2 (other levels) delayed 4 cycles, Previous2 delayed 4 (Pl1) and
// Previous3 delayed 8 (Pr1). Windows are fed one row of three 4-pixel parts
// per 4 cycles. At Level2 the 4x4 block is fed twice, so BSU0 covers vertical
// offsets 0..4 in the first pass and 4..8 in the second, BSU1 covers
// horizontal offsets 4..8; the comparator takes the SADs straight from the
// BSUs (Level2 path) and keeps the two smallest distinct positions. At
// Level1/Level0 each BSU sees a 4-pixel-wide strip of the block (8 or 16
// rows); BSU0's SAD, delayed 4 cycles, is added to BSU1's SAD of the same
// position and accumulated into a 25-word circular buffer (0 is added on the
// first accumulation). Level0 needs two rounds (columns 0..7, then 8..15;
// the second starts 88 cycles after the first, when the first round's window
// has drained). The buffer is then read out to the comparator, one position
// per cycle, which keeps the minimum (strict <, so the earliest wins a tie,
// as in the full-search pseudo code).
//
// Memory side (the address generator): each cycle the unit may read two
// current-MB pixels and three previous-frame pixels at signed frame
// coordinates of the level given on *_rd_level. Data must arrive exactly one
// cycle after the address. Out-of-frame coordinates are the memory's concern.
// A search of one MB takes 444 cycles from start to done.
//
// From the published design: the three levels, the candidate counts, the two BSUs,
// the connections and delays of the BSU inputs, the 25-word buffer, and the
// second Level0 round starting at the 89th cycle. Own choices: the two-pass
// Level2 feed, the tie rule and the one-cycle memory latency. The published design
// quotes 495 cycles per vector; this design measures 444.
module motion_estimator
  import mpeg4_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [4:0]  mb_x,
  input  logic [4:0]  mb_y,
  output logic        busy,
  output logic        done,
  output mv_t         mv,
  output sad_t        sad,
  output mv_t         cand_mv [2],
  // current-MB read ports (Current1, Current2)
  output me_level_e   rd_level,
  output logic        cur_rd_en,
  output logic signed [10:0] cur_rd_x [2],
  output logic signed [10:0] cur_rd_y [2],
  input  pixel_t      cur_rd_pix [2],
  // previous-frame read ports (Previous1..3)
  output logic        prev_rd_en,
  output logic signed [10:0] prev_rd_x [3],
  output logic signed [10:0] prev_rd_y [3],
  input  pixel_t      prev_rd_pix [3]
);
  typedef enum logic [3:0] {
    S_IDLE, S_L2, S_L1A, S_L1A_RD, S_L1B, S_L1B_RD, S_L0A, S_L0B, S_L0_RD
  } state_e;

  state_e state;
  logic [7:0] t;          // cycle within the current feed
  logic [1:0] ev_cnt;     // BSU1 lane-24 results seen in this level step
  logic [4:0] rd_k;       // circular-buffer read-out index
  logic signed [10:0] mbx_s, mby_s;
  mv_t  best_mv  [2];
  sad_t best_sad [2];
  mv_t  center;           // start vector of the current level step (in that level's pixels)

  assign mbx_s = 11'(mb_x);
  assign mby_s = 11'(mb_y);

  // ---------------- feed parameters per step ----------------
  logic feeding;
  int unsigned prows, crows, passrows;
  logic [4:0] cbase0, cbase1, pbase;
  logic signed [10:0] cur_ox, cur_oy, win_ox, win_oy;
  always_comb begin
    feeding  = 1'b1;
    prows    = 12; crows = 8; passrows = 8;
    cbase0   = 5'd0; cbase1 = 5'd4; pbase = 5'd0;
    rd_level = LVL2;
    cur_ox   = mbx_s <<< 2; cur_oy = mby_s <<< 2;
    win_ox   = (mbx_s <<< 2) - 11'sd4; win_oy = (mby_s <<< 2) - 11'sd4;
    unique case (state)
      S_L2: begin passrows = 4; cbase1 = 5'd0; end
      S_L1A, S_L1B, S_L1A_RD, S_L1B_RD: begin
        rd_level = LVL1;
        cur_ox = mbx_s <<< 3; cur_oy = mby_s <<< 3;
        win_ox = (mbx_s <<< 3) + 11'(center.x) - 11'sd2;
        win_oy = (mby_s <<< 3) + 11'(center.y) - 11'sd2;
        feeding = (state == S_L1A) || (state == S_L1B);
      end
      S_L0A, S_L0B, S_L0_RD: begin
        rd_level = LVL0;
        prows = 20; crows = 16; passrows = 16;
        if (state == S_L0B) begin cbase0 = 5'd8; cbase1 = 5'd12; pbase = 5'd8; end
        cur_ox = mbx_s <<< 4; cur_oy = mby_s <<< 4;
        win_ox = (mbx_s <<< 4) + 11'(center.x) - 11'sd2;
        win_oy = (mby_s <<< 4) + 11'(center.y) - 11'sd2;
        feeding = (state != S_L0_RD);
      end
      default: feeding = 1'b0;
    endcase
  end

  // ---------------- address generator ----------------
  logic [5:0] trow;
  logic [1:0] tcol;
  logic [5:0] crow;
  assign trow = t[7:2];
  assign tcol = t[1:0];
  assign crow = (state == S_L2) ? {4'd0, t[3:2]} : t[7:2];
  always_comb begin
    cur_rd_en  = feeding && (32'(t) < 4 * crows);
    prev_rd_en = feeding && (32'(t) < 4 * prows);
    cur_rd_x[0] = cur_ox + 11'(cbase0) + 11'(tcol);
    cur_rd_x[1] = cur_ox + 11'(cbase1) + 11'(tcol);
    cur_rd_y[0] = cur_oy + 11'(crow);
    cur_rd_y[1] = cur_oy + 11'(crow);
    for (int i = 0; i < 3; i++) begin
      prev_rd_x[i] = win_ox + 11'(pbase) + 11'(4 * i) + 11'(tcol);
      prev_rd_y[i] = win_oy + 11'(trow);
    end
  end

  // current-pixel tags, aligned with the one-cycle read latency
  logic       tg_valid, tg_first, tg_last, tg_l2;
  logic [1:0] tg_col;
  logic       par_mirror, l2_par0, l0_par0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tg_valid <= 1'b0; tg_first <= 1'b0; tg_last <= 1'b0; tg_col <= '0; tg_l2 <= 1'b0;
    end else begin
      tg_valid <= cur_rd_en;
      tg_col   <= tcol;
      tg_first <= cur_rd_en && ((32'(t) % (4 * passrows)) == 0);
      tg_last  <= cur_rd_en && ((32'(t) % (4 * passrows)) == 4 * passrows - 1);
      tg_l2    <= (state == S_L2);
    end
  end
  // mirror of the BSUs' pass parity, to tell Level2 round 1 from round 2
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      par_mirror <= 1'b0; l2_par0 <= 1'b0; l0_par0 <= 1'b0;
    end else if (tg_valid && tg_first) begin
      par_mirror <= ~par_mirror;
      if (state == S_L2 && t < 8'd8) l2_par0 <= par_mirror;
      if (state == S_L0A && t < 8'd8) l0_par0 <= par_mirror;
    end
  end

  // ---------------- BSU input delays ----------------
  typedef struct packed {
    logic valid; pixel_t pix; logic [1:0] col; logic first; logic last;
  } cin_t;
  cin_t   c1_src, c1_dly [4];
  pixel_t p2_dly [4];
  pixel_t p3_dly [8];
  assign c1_src = '{valid: tg_valid, pix: (tg_l2 ? cur_rd_pix[0] : cur_rd_pix[1]),
                    col: tg_col, first: tg_first, last: tg_last};
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) c1_dly[i] <= '0;
    end else begin
      c1_dly[0] <= c1_src;
      for (int i = 1; i < 4; i++) c1_dly[i] <= c1_dly[i-1];
    end
    p2_dly[0] <= prev_rd_pix[1];
    for (int i = 1; i < 4; i++) p2_dly[i] <= p2_dly[i-1];
    p3_dly[0] <= prev_rd_pix[2];
    for (int i = 1; i < 8; i++) p3_dly[i] <= p3_dly[i-1];
  end

  logic [1:0] b_valid [2];
  sad_t       b_sad   [2][2];
  logic [2:0] b_x     [2][2];
  logic [2:0] b_y     [2][2];

  bsu2d #(.BLK(4), .NPOS(5)) u_bsu0 (
    .clk, .rst_n,
    .c_valid(tg_valid), .c_pix(cur_rd_pix[0]), .c_col(tg_col), .c_first(tg_first), .c_last(tg_last),
    .pl_pix(prev_rd_pix[0]), .pr_pix(p2_dly[3]),
    .out_valid(b_valid[0]), .out_sad(b_sad[0]), .out_x(b_x[0]), .out_y(b_y[0])
  );
  bsu2d #(.BLK(4), .NPOS(5)) u_bsu1 (
    .clk, .rst_n,
    .c_valid(c1_dly[3].valid), .c_pix(c1_dly[3].pix), .c_col(c1_dly[3].col),
    .c_first(c1_dly[3].first), .c_last(c1_dly[3].last),
    .pl_pix(p2_dly[3]), .pr_pix(p3_dly[7]),
    .out_valid(b_valid[1]), .out_sad(b_sad[1]), .out_x(b_x[1]), .out_y(b_y[1])
  );

  // ---------------- Level0/Level1 path ----------------
  typedef struct packed { logic valid; logic par; sad_t sad; logic [4:0] k; } lane_t;
  lane_t m0, m1, m0_dly [4];
  always_comb begin
    m0 = '0; m1 = '0;
    for (int p = 0; p < 2; p++) begin
      if (b_valid[0][p]) m0 = '{valid: 1'b1, par: 1'(p), sad: b_sad[0][p], k: 5'(5 * b_y[0][p] + b_x[0][p])};
      if (b_valid[1][p]) m1 = '{valid: 1'b1, par: 1'(p), sad: b_sad[1][p], k: 5'(5 * b_y[1][p] + b_x[1][p])};
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) for (int i = 0; i < 4; i++) m0_dly[i] <= '0;
    else begin
      m0_dly[0] <= m0;
      for (int i = 1; i < 4; i++) m0_dly[i] <= m0_dly[i-1];
    end
  end

  sad_t cbuf [25];
  // mux select '0' (first accumulation) for Level1 and for Level0 round 1;
  // the round is told by the pass parity, since round-1 results are still
  // arriving when round 2 has begun
  logic acc_first;
  assign acc_first = !((state == S_L0A || state == S_L0B) && (m1.par != l0_par0));
  logic l01_step;
  assign l01_step = (state == S_L1A) || (state == S_L1B) || (state == S_L0A) || (state == S_L0B);
  always_ff @(posedge clk) begin
    if (l01_step && m1.valid)
      cbuf[m1.k] <= m0_dly[3].sad + m1.sad + (acc_first ? sad_t'(0) : cbuf[m1.k]);
  end

  // the two partial SADs added together must belong to the same position
  assert property (@(posedge clk) disable iff (!rst_n)
                   (l01_step && m1.valid) |-> (m0_dly[3].valid && m0_dly[3].k == m1.k));

  // BSU1 reported the last position (lane 24) of a pass, on either port
  logic last_ev;
  always_comb begin
    last_ev = 1'b0;
    for (int p = 0; p < 2; p++)
      if (b_valid[1][p] && b_x[1][p] == 3'd4 && b_y[1][p] == 3'd4) last_ev = 1'b1;
  end

  // ---------------- comparator ----------------
  typedef struct packed { logic valid; sad_t sad; mv_t mv; } cand_t;
  cand_t l2c [4];
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      for (int p = 0; p < 2; p++) begin
        logic rnd;
        rnd = (1'(p) != l2_par0);
        l2c[2*b+p].valid = (state == S_L2) && b_valid[b][p]
                           && !(b == 1 && b_x[b][p] == 3'd0)
                           && !(rnd && b_y[b][p] == 3'd0);
        l2c[2*b+p].sad   = b_sad[b][p];
        l2c[2*b+p].mv.x  = mvc_t'(b_x[b][p]) + mvc_t'(4 * b) - 7'sd4;
        l2c[2*b+p].mv.y  = mvc_t'(b_y[b][p]) + (rnd ? 7'sd4 : 7'sd0) - 7'sd4;
      end
    end
  end

  mv_t  rd_mv;
  logic rd_active;
  assign rd_active = (state == S_L1A_RD) || (state == S_L1B_RD) || (state == S_L0_RD);
  logic [4:0] rd_kx, rd_ky;
  always_comb begin
    rd_kx   = rd_k % 5'd5;
    rd_ky   = rd_k / 5'd5;
    rd_mv.x = center.x + mvc_t'(rd_kx) - 7'sd2;
    rd_mv.y = center.y + mvc_t'(rd_ky) - 7'sd2;
  end

  // ---------------- sequencer ----------------
  mv_t l1_best;
  always_comb begin
    unique case (state)
      S_L1A, S_L1A_RD: center = '{x: cand_mv[0].x <<< 1, y: cand_mv[0].y <<< 1};
      S_L1B, S_L1B_RD: center = '{x: cand_mv[1].x <<< 1, y: cand_mv[1].y <<< 1};
      default:         center = '{x: l1_best.x <<< 1, y: l1_best.y <<< 1};
    endcase
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; t <= '0; ev_cnt <= '0; rd_k <= '0;
      done <= 1'b0; mv <= '0; sad <= '0; l1_best <= '0;
      for (int i = 0; i < 2; i++) begin best_mv[i] <= '0; best_sad[i] <= '1; cand_mv[i] <= '0; end
    end else begin
      mv_t  bm [2];
      sad_t bs [2];
      bm = best_mv; bs = best_sad;
      done <= 1'b0;
      if (feeding && t != 8'hff) t <= t + 8'd1;
      if (last_ev) ev_cnt <= ev_cnt + 2'd1;

      // Level2 path: keep the two smallest SADs
      if (state == S_L2) begin
        for (int i = 0; i < 4; i++) begin
          if (l2c[i].valid) begin
            if (l2c[i].sad < bs[0]) begin
              bs[1] = bs[0]; bm[1] = bm[0]; bs[0] = l2c[i].sad; bm[0] = l2c[i].mv;
            end else if (l2c[i].sad < bs[1]) begin
              bs[1] = l2c[i].sad; bm[1] = l2c[i].mv;
            end
          end
        end
      end
      // Level1/Level0: keep the minimum of the circular-buffer read-out
      if (rd_active) begin
        rd_k <= rd_k + 5'd1;
        if (cbuf[rd_k] < bs[0]) begin
          bs[0] = cbuf[rd_k]; bm[0] = rd_mv;
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_L2; t <= '0; ev_cnt <= '0;
          bs[0] = '1; bs[1] = '1; bm[0] = '0; bm[1] = '0;
        end
        S_L2: if (last_ev && ev_cnt == 2'd1) begin
          state <= S_L1A; t <= '0; ev_cnt <= '0;
          cand_mv[0] <= bm[0]; cand_mv[1] <= bm[1];
          bs[0] = '1; bm[0] = '0;
        end
        S_L1A, S_L1B: if (last_ev) begin
          state <= (state == S_L1A) ? S_L1A_RD : S_L1B_RD; rd_k <= '0; ev_cnt <= '0;
        end
        S_L1A_RD: if (rd_k == 5'd24) begin
          state <= S_L1B; t <= '0;
        end
        S_L1B_RD: if (rd_k == 5'd24) begin
          state <= S_L0A; t <= '0; ev_cnt <= '0;
          l1_best <= bm[0];
          bs[0] = '1; bm[0] = '0;
        end
        S_L0A: if (t == 8'd87) begin
          state <= S_L0B; t <= '0;
        end
        S_L0B: if (last_ev && ev_cnt == 2'd1) begin
          state <= S_L0_RD; rd_k <= '0; ev_cnt <= '0;
        end
        S_L0_RD: if (rd_k == 5'd24) begin
          state <= S_IDLE; done <= 1'b1; mv <= bm[0]; sad <= bs[0];
        end
        default: state <= S_IDLE;
      endcase
      best_mv <= bm; best_sad <= bs;
    end
  end
endmodule
