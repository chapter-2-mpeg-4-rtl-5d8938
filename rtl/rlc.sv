// rlc: RLC controller and run length coder of the VLC stage.
//
// For each macroblock (start pulse) the controller first has the macroblock
// header code words (mcbpc, cbpy, mvd) produced by the header look-up tables,
// then takes the six blocks in turn. For an intra macroblock each block's DC
// coefficient (scan position 0) is sent to the DC table; the AC coefficients
// of a block whose cbp bit is set are read in scan order (from position 1 for
// intra, 0 for inter), one per cycle. Each non-zero coefficient gives a
// symbol (level, run), run being the number of zeros before it in scan order;
// when position 63 has been read the `last` strobe marks the block's final
// symbol in the RLC FIFO. Reading pauses while the FIFO is almost full.
//
// Look-up-table requests (lut_req with lut_kind 0: MB header, 1: intra DC,
// lut_blk, lut_dc) are held until lut_done. Before each request the coder
// waits for path_idle (FIFO and Huff_coder empty), so code words reach the
// packer in bitstream order. done pulses when the macroblock's last code has
// left the coding path.
//
// From the published design: the RLC controller and the use of the DC, cbp and mvd
// tables. Own choices: the request order, and waiting for path_idle.
// Lint note: only info.intra and info.cbp are read here. The scan field is
// used by the coefficient buffer, and mvd by the external header table.
module rlc
  import mpeg4_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // coefficient buffer
  input  mb_info_t   info,
  output logic [2:0] rd_blk,
  output logic [5:0] rd_pos,
  input  coef_t      rd_data,
  // RLC FIFO
  output logic       wren,
  output coef_t      level,
  output logic [5:0] run,
  output logic       last,
  input  logic       almost_full,
  input  logic       path_idle,
  // header / DC tables
  output logic       lut_req,
  output logic       lut_kind,
  output logic [2:0] lut_blk,
  output coef_t      lut_dc,
  input  logic       lut_done
);
  typedef enum logic [2:0] {R_IDLE, R_HDR, R_BLK, R_DC_WAIT, R_DC, R_AC, R_ADV, R_FLUSH} rstate_e;
  rstate_e    st;
  logic [2:0] blk;
  logic [5:0] pos;
  logic [5:0] zeros;
  logic       any;         // a symbol of this block has been written

  assign busy     = (st != R_IDLE);
  assign rd_blk   = blk;
  assign rd_pos   = (st == R_AC) ? pos : 6'd0;
  assign lut_blk  = blk;
  assign lut_dc   = rd_data;
  assign lut_kind = (st == R_DC);
  assign lut_req  = (st == R_HDR) || (st == R_DC);

  logic step, nz;
  assign step  = (st == R_AC) && !almost_full;
  assign nz    = (rd_data != '0);
  assign wren  = step && nz;
  assign level = rd_data;
  assign run   = zeros;
  assign last  = step && (pos == 6'd63) && (any || nz);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= R_IDLE; blk <= '0; pos <= '0; zeros <= '0; any <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        R_IDLE:    if (start) begin st <= R_HDR; blk <= '0; end
        R_HDR:     if (lut_done) st <= R_BLK;
        R_BLK: begin
          zeros <= '0; any <= 1'b0;
          if (info.intra)           st <= R_DC_WAIT;
          else if (info.cbp[blk]) begin st <= R_AC; pos <= 6'd0; end
          else                      st <= R_ADV;
        end
        R_DC_WAIT: if (path_idle) st <= R_DC;
        R_DC:      if (lut_done) begin
          if (info.cbp[blk]) begin st <= R_AC; pos <= 6'd1; end
          else st <= R_ADV;
        end
        R_AC: if (step) begin
          zeros <= nz ? 6'd0 : zeros + 6'd1;
          if (nz) any <= 1'b1;
          pos <= pos + 6'd1;
          if (pos == 6'd63) st <= R_ADV;
        end
        R_ADV: begin
          if (blk == 3'd5) st <= R_FLUSH;
          else begin blk <= blk + 3'd1; st <= R_BLK; end
        end
        R_FLUSH: if (path_idle) begin st <= R_IDLE; done <= 1'b1; end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
