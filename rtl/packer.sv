// packer: packs variable length code words into 32-bit bitstream words.
//
// Code words (right aligned in 32 bits, length 1..32) are appended MSB first.
// The residue of bits that do not yet fill a word is kept left aligned in a
// residual register with its bit count (the published design's D3/D6 registers); a
// new code word is shifted right by that count and merged behind it. When the
// count reaches 32 (the carry out of the bit counter) a 32-bit word is
// presented on out_word with out_valid and the remaining bits move up. flush
// pads the residue with zeros to a whole word and emits it (nothing if the
// residue is empty); flush_done pulses when that is finished. One code word
// is accepted per cycle while the output is free or being taken.
//
// From the published design: MSB-first packing into 32-bit words, the residue and
// bit-count registers, and the FIFO before the packer. Own choice: a single
// shifter into a 64-bit residue, where the published design uses two 16-bit barrel
// shifters. The output is identical.
module packer
  import mpeg4_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  vlc_word_t   in_word,
  output logic        in_ready,
  input  logic        flush,
  output logic        flush_done,
  output logic        out_valid,
  output logic [31:0] out_word,
  input  logic        out_ready
);
  logic [63:0] resid;       // residual bits, left aligned
  logic [5:0]  nbits;       // number of residual bits, 0..31 between words
  logic        flushing;

  logic        free;
  assign free     = !out_valid || out_ready;
  assign in_ready = free && !flushing;

  logic [63:0] placed;
  logic [6:0]  total;
  always_comb begin
    // barrel shift: move the code word to sit right behind the residue
    placed = ({32'd0, in_word.code} << (7'd64 - 7'(in_word.len))) >> nbits;
    total  = 7'(nbits) + 7'(in_word.len);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resid <= '0; nbits <= '0; out_valid <= 1'b0; out_word <= '0;
      flushing <= 1'b0; flush_done <= 1'b0;
    end else begin
      flush_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (flush && !flushing) flushing <= 1'b1;
      if (in_valid && in_ready) begin
        if (total >= 7'd32) begin
          out_valid <= 1'b1;
          out_word  <= resid[63:32] | placed[63:32];
          resid     <= {resid[31:0] | placed[31:0], 32'd0};
          nbits     <= 6'(total - 7'd32);
        end else begin
          resid <= resid | placed;
          nbits <= 6'(total);
        end
      end else if (flushing && free) begin
        if (nbits != 0) begin
          out_valid <= 1'b1;
          out_word  <= resid[63:32];
          resid     <= '0;
          nbits     <= '0;
        end
        flushing   <= 1'b0;
        flush_done <= 1'b1;
      end
    end
  end
endmodule
