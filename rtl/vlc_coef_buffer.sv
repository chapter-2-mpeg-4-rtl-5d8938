// vlc_coef_buffer: ping-pong quantized-coefficient buffer of the VLC stage.
//
// Two banks, each with a Qcoefficient RAM for the six 8x8 blocks of a
// macroblock (Y1..Y4, U, V; 6 x 64 words of 12 bits) and a register for the
// macroblock's side information (cbp, prediction/scan selection and motion
// vector difference). The texture coder fills one bank in raster order while
// the run length coder reads the other; swap exchanges the banks at the end
// of a time slot. The read side gives a block number and a scan position
// 0..63; scan_remap turns the position into the raster address according to
// the block's scan order, so the three scan orders cost only two small tables.
// Reads are combinational (data valid in the same cycle as the address).
//
// From the published design: the ping-pong Qcoefficient RAM, the cbp/pmv register
// and the address remap. Own choice: combinational reads.
module vlc_coef_buffer
  import mpeg4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       swap,
  // texture-coding side
  input  logic       wr_en,
  input  logic [2:0] wr_blk,
  input  logic [5:0] wr_addr,      // raster address 8*row + column
  input  coef_t      wr_data,
  input  logic       info_wr_en,
  input  mb_info_t   info_wr,
  // run-length-coding side
  input  logic [2:0] rd_blk,
  input  logic [5:0] rd_pos,       // scan position
  output coef_t      rd_data,
  output mb_info_t   rd_info
);
  coef_t    ram [2][6][64];
  mb_info_t info [2];
  logic     wbank;
  logic [5:0] raddr;

  always_ff @(posedge clk) begin
    if (!rst_n)    wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;
  end

  always_ff @(posedge clk) begin
    if (wr_en) ram[wbank][wr_blk][wr_addr] <= wr_data;
    if (info_wr_en) info[wbank] <= info_wr;
  end

  scan_remap u_remap (.scan(info[~wbank].scan[rd_blk]), .pos(rd_pos), .addr(raddr));

  assign rd_data = ram[~wbank][rd_blk][raddr];
  assign rd_info = info[~wbank];
endmodule
