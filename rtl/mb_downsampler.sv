// mb_downsampler: macroblock-level downsampler of the reconstructed frame.
//
// While the reconstructed macroblock leaves the MC adder, this block derives
// its Level1 (8x8) and Level2 (4x4) versions, so that the reference frame of
// the next P frame is already downsampled. Input is one row of eight pixels of
// an 8x8 block per cycle, rows 0..7 in order, blocks Y1 (top left), Y2 (top
// right), Y3 (bottom left), Y4 (bottom right); U and V rows (in_blk 4, 5) are
// ignored. Same filter as the frame downsampler: floor of the 2x2 mean, the
// Level2 pixels taken from the floored Level1 pixels.
//
// Pipeline: four adders form the
// horizontal pair sums of a row; on even rows they are kept in temporary
// register 1, on odd rows four more adders complete four Level1 pixels, which
// go out as one Level1 word (the Level1 data register). Two adders then form
// the pair sums of the Level1 pixels; on even Level1 rows they are kept in
// temporary register 2, on odd ones two adders complete two Level2 pixels,
// stored in the Level2 data register of the block (four registers of four
// pixels). Each stage carries the write enable and address with the data.
// Timing: the Level1 word of rows 2r, 2r+1 appears 2 cycles after row 2r+1
// enters; l2_ready pulses 4 cycles after row 7 of Y4 enters. The Level2
// macroblock is then read one 4-pixel row per l2_rd_addr.
//
// From the published design: the register stages. Own choices: the input order and
// the output timing.
module mb_downsampler
  import mpeg4_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [2:0]  in_blk,       // 0..3: Y1..Y4, 4: U, 5: V
  input  logic [2:0]  in_row,
  input  pixel_t      in_pix [8],
  output logic        l1_valid,
  output logic [2:0]  l1_y,         // Level1 row within the 8x8 Level1 MB
  output logic        l1_x4,        // 0: columns 0..3, 1: columns 4..7
  output logic [31:0] l1_word,      // pixel 0 in bits 7:0
  output logic        l2_ready,
  input  logic [1:0]  l2_rd_addr,   // Level2 MB row
  output logic [31:0] l2_rd_data
);
  // stage 1: horizontal pair sums
  logic       s1_wren;
  logic [1:0] s1_blk;
  logic [2:0] s1_row;
  logic [8:0] s1_h [4];
  always_ff @(posedge clk) begin
    if (!rst_n) s1_wren <= 1'b0;
    else        s1_wren <= in_valid && (in_blk < 3'd4);
    s1_blk <= in_blk[1:0];
    s1_row <= in_row;
    for (int j = 0; j < 4; j++) s1_h[j] <= 9'(in_pix[2*j]) + 9'(in_pix[2*j+1]);
  end

  // stage 2: temporary register 1, Level1 pixels
  logic [8:0] tmp1 [4];
  logic [9:0] v1 [4];
  pixel_t     l1p [4];
  always_comb
    for (int j = 0; j < 4; j++) begin
      v1[j]  = 10'(s1_h[j]) + 10'(tmp1[j]);
      l1p[j] = v1[j][9:2];
    end
  logic       s2_wren;
  logic [1:0] s2_blk;
  logic [1:0] s2_l1row;           // Level1 row within the block (0..3)
  pixel_t     s2_l1 [4];
  always_ff @(posedge clk) begin
    if (s1_wren && !s1_row[0]) tmp1 <= s1_h;
    if (!rst_n) s2_wren <= 1'b0;
    else        s2_wren <= s1_wren && s1_row[0];
    s2_blk   <= s1_blk;
    s2_l1row <= s1_row[2:1];
    s2_l1    <= l1p;
  end
  assign l1_valid = s2_wren;
  assign l1_y     = {s2_blk[1], s2_l1row};
  assign l1_x4    = s2_blk[0];
  assign l1_word  = {s2_l1[3], s2_l1[2], s2_l1[1], s2_l1[0]};

  // stage 3: Level1 pair sums
  logic       s3_wren;
  logic [1:0] s3_blk;
  logic [1:0] s3_l1row;
  logic [8:0] s3_g [2];
  always_ff @(posedge clk) begin
    if (!rst_n) s3_wren <= 1'b0;
    else        s3_wren <= s2_wren;
    s3_blk   <= s2_blk;
    s3_l1row <= s2_l1row;
    for (int j = 0; j < 2; j++) s3_g[j] <= 9'(s2_l1[2*j]) + 9'(s2_l1[2*j+1]);
  end

  // stage 4: temporary register 2, Level2 data registers 1..4
  logic [8:0] tmp2 [2];
  pixel_t     l2reg [4][4];       // [block][2*row + col]
  logic [9:0] v2 [2];
  always_comb for (int j = 0; j < 2; j++) v2[j] = 10'(s3_g[j]) + 10'(tmp2[j]);
  always_ff @(posedge clk) begin
    if (s3_wren && !s3_l1row[0]) tmp2 <= s3_g;
    if (s3_wren && s3_l1row[0])
      for (int j = 0; j < 2; j++) l2reg[s3_blk][2 * s3_l1row[1] + j] <= v2[j][9:2];
    if (!rst_n) l2_ready <= 1'b0;
    else        l2_ready <= s3_wren && s3_l1row == 2'd3 && s3_blk == 2'd3;
  end

  // Level2 read multiplexer: MB row r is row r%2 of blocks Y1|Y2 or Y3|Y4
  logic [1:0] bl, br;
  logic       rr;
  assign bl = {l2_rd_addr[1], 1'b0};
  assign br = {l2_rd_addr[1], 1'b1};
  assign rr = l2_rd_addr[0];
  assign l2_rd_data = {l2reg[br][2*rr+1], l2reg[br][2*rr], l2reg[bl][2*rr+1], l2reg[bl][2*rr]};
endmodule
