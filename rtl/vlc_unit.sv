// vlc_unit: variable length coding stage (Qcoef buffer, RLC, RLC FIFO,
// Huff_coder, input buffer and packer).
//
// The texture coder writes a macroblock's quantised coefficients (raster
// order, per block) and its mb_info into the write bank of the ping-pong
// coefficient buffer, then pulses mb_swap; a pulse on mb_start starts coding
// of the bank just swapped in. The RLC controller reads it in the scan order
// chosen per block, the run length coder produces (level, run, last)
// symbols into the RLC FIFO, the Huff_coder turns them into code words, and
// the code words pass through a small input buffer into the packer, which
// produces 32-bit bitstream words on bs_valid/bs_word.
//
// Header (mcbpc, cbpy, mvd) and intra DC code words come from the external
// look-up tables: while lut_req is high the table returns code words on
// lut_word_valid/lut_word and finishes with lut_done. These words are merged
// into the same buffer; the RLC controller only asks for them when the
// symbol path is empty, so the order of the bitstream is kept.
// frame_flush pads the last partial word at the end of a frame.
//
// From the published design: the chain buffer -> RLC -> RLC FIFO -> Huff_coder ->
// FIFO -> packer. Own choices: the input buffer depth (4), merging the table
// words, and the deferred flush.
module vlc_unit
  import mpeg4_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 3,
  parameter int unsigned BUF_DEPTH  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // coefficient input
  input  logic        coef_wr_en,
  input  logic [2:0]  coef_wr_blk,
  input  logic [5:0]  coef_wr_addr,
  input  coef_t       coef_wr_data,
  input  logic        info_wr_en,
  input  mb_info_t    info_wr,
  input  logic        mb_swap,
  input  logic        mb_start,
  output logic        mb_busy,
  output logic        mb_done,
  // external header / DC tables
  output logic        lut_req,
  output logic        lut_kind,
  output logic [2:0]  lut_blk,
  output coef_t       lut_dc,
  output mb_info_t    lut_info,
  input  logic        lut_word_valid,
  input  vlc_word_t   lut_word,
  input  logic        lut_done,
  // bitstream
  input  logic        frame_flush,
  output logic        flush_done,
  output logic        bs_valid,
  output logic [31:0] bs_word,
  input  logic        bs_ready,
  // activity (for counting)
  output logic        sym_fire,
  output logic        code_fire,
  output logic        rlc_pause      // coding held back by a nearly full RLC FIFO
);
  logic [2:0] rd_blk;
  logic [5:0] rd_pos;
  coef_t      rd_data;
  mb_info_t   rd_info;

  vlc_coef_buffer u_buf (
    .clk, .rst_n, .swap(mb_swap),
    .wr_en(coef_wr_en), .wr_blk(coef_wr_blk), .wr_addr(coef_wr_addr), .wr_data(coef_wr_data),
    .info_wr_en, .info_wr,
    .rd_blk, .rd_pos, .rd_data, .rd_info
  );

  logic wren, last, almost_full, path_idle;
  coef_t level;
  logic [5:0] run;

  rlc u_rlc (
    .clk, .rst_n, .start(mb_start), .busy(mb_busy), .done(mb_done),
    .info(rd_info), .rd_blk, .rd_pos, .rd_data,
    .wren, .level, .run, .last, .almost_full, .path_idle,
    .lut_req, .lut_kind, .lut_blk, .lut_dc, .lut_done
  );
  assign lut_info = rd_info;

  logic     f_valid, f_full, f_empty, f_rd;
  rlc_sym_t f_sym;
  rlc_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wren, .level, .run, .last, .rd(f_rd),
    .valid(f_valid), .sym(f_sym), .full(f_full), .almost_full, .empty(f_empty)
  );

  logic      h_valid, h_ready;
  vlc_word_t h_word;
  huff_coder u_huff (
    .clk, .rst_n, .in_valid(f_valid), .in_sym(f_sym), .in_rd(f_rd),
    .out_valid(h_valid), .out_word(h_word), .out_ready(h_ready)
  );
  assign path_idle = f_empty && !h_valid;

  // merge table words and Huff words into the packer input buffer; the
  // controller never has both active at once (table words are only
  // requested while the symbol path is idle)
  logic      b_in_valid, b_in_ready, b_out_valid, b_out_ready;
  vlc_word_t b_in, b_out;
  assign b_in_valid = lut_word_valid || h_valid;
  assign b_in       = lut_word_valid ? lut_word : h_word;
  assign h_ready    = b_in_ready && !lut_word_valid;

  logic [$clog2(BUF_DEPTH+1)-1:0] b_count;
  sync_fifo #(.WIDTH($bits(vlc_word_t)), .DEPTH(BUF_DEPTH)) u_inbuf (
    .clk, .rst_n, .in_valid(b_in_valid), .in_data(b_in), .in_ready(b_in_ready),
    .out_valid(b_out_valid), .out_data(b_out), .out_ready(b_out_ready), .count(b_count)
  );

  // flush only once everything queued has been packed
  logic flush_pend;
  always_ff @(posedge clk) begin
    if (!rst_n) flush_pend <= 1'b0;
    else if (frame_flush) flush_pend <= 1'b1;
    else if (flush_pend && !b_out_valid && path_idle) flush_pend <= 1'b0;
  end

  packer u_pack (
    .clk, .rst_n, .in_valid(b_out_valid), .in_word(b_out), .in_ready(b_out_ready),
    .flush(flush_pend && !b_out_valid && path_idle), .flush_done,
    .out_valid(bs_valid), .out_word(bs_word), .out_ready(bs_ready)
  );

  assign sym_fire  = wren;
  assign code_fire = b_out_valid && b_out_ready;
  assign rlc_pause = mb_busy && almost_full;

  // the coder pauses at almost full, so the symbol FIFO never overflows
  assert property (@(posedge clk) disable iff (!rst_n) wren |-> !f_full);
  assert property (@(posedge clk) disable iff (!rst_n) 32'(b_count) <= BUF_DEPTH);
  // table words are expected only while the symbol path is idle
  assert property (@(posedge clk) disable iff (!rst_n) lut_word_valid |-> !h_valid);
endmodule
