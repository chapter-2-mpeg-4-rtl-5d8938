// downsample_unit: frame downsampler for the hierarchical motion search.
//
// Produces the Level1 (1/2) and Level2 (1/4) images of a frame with the
// filter p'(i,j) = floor((p(2i,2j) + p(2i+1,2j) + p(2i,2j+1) + p(2i+1,2j+1)) / 4),
// Level2 being filtered from the already floored Level1 pixels. Input is one
// 32-bit word of four Level0 pixels (P1 in bits 7:0 .. P4 in bits 31:24) per
// cycle, row by row; a loop is four Level0 rows (IMG_W/4 words each) and gives
// two Level1 rows and one Level2 row. A CIF frame (352x288) takes 72 loops,
// 25344 input cycles.
//
// Datapath, following the published design's row-by-row scheme:
//  - rows 0 and 2 (L0_even_data_path): the pair sums P1+P2 and P3+P4 are
//    written to RAM1 (IMG_W/4 x 18 bits);
//  - rows 1 and 3: the pair sums are added to RAM1's sums and truncated by two
//    bits, giving two Level1 pixels per word; after three pipeline stages every
//    second word completes a Level1 word (L1_P11..L1_P14), written to RAM2
//    (Level1 row 0, from Level0 row 1) or RAM3 (Level1 row 1, from row 3);
//  - L1_row0_data_path: during row 1 the Level1 pair sums L1_P11+L1_P12 and
//    L1_P13+L1_P14 go to RAM4 (IMG_W/8 x 18 bits);
//  - L1_row1_data_path: during row 3 the Level1 pair sums are added to RAM4's
//    sums, truncated by two bits, and every second result pair is latched so
//    that four Level2 pixels are written per RAM5 word (IMG_W/16 x 32 bits).
// RAM2, RAM3 and RAM5 hold the last loop's result and have read ports; every
// word written to them is also presented on the l1_wr_*/l2_wr_* outputs, for
// a consumer that copies the results to frame memory. loop_done pulses when
// the Level2 word of a loop has been written, 4 cycles after the clock edge
// that takes the loop's last input word.
//
// From the published design: the four-row loop, the RAM1..RAM5 sizes and the data
// paths. Own choices: the pipeline depth, the input word packing, and Level2
// computed from the floored Level1 pixels.
// Lint note: the low two bits of the 10-bit sums sa, sb, ua and ub are unused.
// Dropping them is the floor of the divide by four, so the warning stays.
module downsample_unit
  import mpeg4_pkg::*;
#(
  parameter int unsigned IMG_W = 352
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,   // restart at row 0, word 0
  input  logic        in_valid,
  input  logic [31:0] in_word,
  output logic        l1_wr_en,
  output logic        l1_wr_row,     // 0: RAM2 (Level1 row 0), 1: RAM3 (row 1)
  output logic [$clog2(IMG_W/8)-1:0]  l1_wr_addr,
  output logic [31:0] l1_wr_data,
  output logic        l2_wr_en,
  output logic [$clog2(IMG_W/16)-1:0] l2_wr_addr,
  output logic [31:0] l2_wr_data,
  output logic        loop_done,
  input  logic        l1_rd_row,
  input  logic [$clog2(IMG_W/8)-1:0]  l1_rd_addr,
  output logic [31:0] l1_rd_data,
  input  logic [$clog2(IMG_W/16)-1:0] l2_rd_addr,
  output logic [31:0] l2_rd_data
);
  localparam int unsigned NW0 = IMG_W / 4;    // Level0 words per row
  localparam int unsigned NW1 = IMG_W / 8;    // Level1 words per row
  localparam int unsigned NW2 = IMG_W / 16;   // Level2 words per row
  localparam int unsigned AW0 = $clog2(NW0);
  localparam int unsigned AW1 = $clog2(NW1);
  localparam int unsigned AW2 = $clog2(NW2);

  logic [17:0] ram1 [NW0];
  logic [31:0] ram2 [NW1];
  logic [31:0] ram3 [NW1];
  logic [17:0] ram4 [NW1];
  logic [31:0] ram5 [NW2];

  // ---- input position ----
  logic [AW0-1:0] w;
  logic [1:0]     row;
  always_ff @(posedge clk) begin
    if (!rst_n || frame_start) begin
      w <= '0; row <= '0;
    end else if (in_valid) begin
      if (32'(w) == NW0 - 1) begin
        w <= '0; row <= row + 2'd1;
      end else w <= w + 1'b1;
    end
  end

  logic [8:0] s12, s34;
  assign s12 = 9'(in_word[7:0])   + 9'(in_word[15:8]);
  assign s34 = 9'(in_word[23:16]) + 9'(in_word[31:24]);

  // ---- stage 1: even rows write RAM1, odd rows read it ----
  logic           p1_valid, p1_row3;
  logic [AW0-1:0] p1_w;
  logic [8:0]     p1_s12, p1_s34;
  logic [17:0]    p1_ram1;
  always_ff @(posedge clk) begin
    if (in_valid && !row[0]) ram1[w] <= {s34, s12};
    p1_ram1 <= ram1[w];
    p1_s12  <= s12;
    p1_s34  <= s34;
    p1_w    <= w;
    p1_row3 <= row[1];
    if (!rst_n) p1_valid <= 1'b0;
    else        p1_valid <= in_valid && row[0] && !frame_start;
  end

  // ---- stage 2: two Level1 pixels ----
  logic           p2_valid, p2_row3;
  logic [AW0-1:0] p2_w;
  logic [7:0]     p2_a, p2_b;
  logic [9:0]     sa, sb;
  assign sa = 10'(p1_s12) + 10'(p1_ram1[8:0]);
  assign sb = 10'(p1_s34) + 10'(p1_ram1[17:9]);
  always_ff @(posedge clk) begin
    p2_a    <= sa[9:2];
    p2_b    <= sb[9:2];
    p2_w    <= p1_w;
    p2_row3 <= p1_row3;
    if (!rst_n) p2_valid <= 1'b0;
    else        p2_valid <= p1_valid;
  end

  // ---- stage 3: Level1 word, RAM2/RAM3, Level1 row paths ----
  logic [7:0] hold_a, hold_b;
  logic       l1_word_valid;
  logic [31:0] l1_word;
  logic [AW1-1:0] l1_idx;
  assign l1_word_valid = p2_valid && p2_w[0];
  assign l1_word = {p2_b, p2_a, hold_b, hold_a};   // L1_P14, P13, P12, P11
  assign l1_idx  = AW1'(p2_w >> 1);
  logic [8:0] t12, t34;
  assign t12 = 9'(hold_a) + 9'(hold_b);
  assign t34 = 9'(p2_a) + 9'(p2_b);

  logic           p3_valid;
  logic [AW1-1:0] p3_idx;
  logic [8:0]     p3_t12, p3_t34;
  logic [17:0]    p3_ram4;
  always_ff @(posedge clk) begin
    if (p2_valid && !p2_w[0]) begin hold_a <= p2_a; hold_b <= p2_b; end
    if (l1_word_valid && !p2_row3) begin
      ram2[l1_idx] <= l1_word;
      ram4[l1_idx] <= {t34, t12};
    end
    if (l1_word_valid && p2_row3) ram3[l1_idx] <= l1_word;
    p3_ram4 <= ram4[l1_idx];
    p3_t12  <= t12;
    p3_t34  <= t34;
    p3_idx  <= l1_idx;
    if (!rst_n) p3_valid <= 1'b0;
    else        p3_valid <= l1_word_valid && p2_row3;
  end
  assign l1_wr_en   = l1_word_valid;
  assign l1_wr_row  = p2_row3;
  assign l1_wr_addr = l1_idx;
  assign l1_wr_data = l1_word;

  // ---- stage 4: Level2 pixels, latch odd word, RAM5 ----
  logic [9:0] ua, ub;
  logic [7:0] l2a, l2b, hold2_a, hold2_b;
  assign ua  = 10'(p3_t12) + 10'(p3_ram4[8:0]);
  assign ub  = 10'(p3_t34) + 10'(p3_ram4[17:9]);
  assign l2a = ua[9:2];
  assign l2b = ub[9:2];
  assign l2_wr_en   = p3_valid && p3_idx[0];
  assign l2_wr_addr = AW2'(p3_idx >> 1);
  assign l2_wr_data = {l2b, l2a, hold2_b, hold2_a};
  always_ff @(posedge clk) begin
    if (p3_valid && !p3_idx[0]) begin hold2_a <= l2a; hold2_b <= l2b; end
    if (l2_wr_en) ram5[l2_wr_addr] <= l2_wr_data;
    if (!rst_n) loop_done <= 1'b0;
    else        loop_done <= l2_wr_en && (32'(l2_wr_addr) == NW2 - 1);
  end

  assign l1_rd_data = l1_rd_row ? ram3[l1_rd_addr] : ram2[l1_rd_addr];
  assign l2_rd_data = ram5[l2_rd_addr];
endmodule
