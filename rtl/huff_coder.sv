// huff_coder: 3-D (last, run, level) variable length coder.
//
// Takes one symbol from the RLC FIFO when it is valid and the output register
// is free, and gives one code word per symbol, right aligned in 32 bits with
// its length. This version codes every symbol with the escape type 3 form,
// which the MPEG-4 syntax accepts for any symbol:
//   0000011 (ESCAPE) | 11 | last (1) | run (6) | 1 | level (12, two's
//   complement) | 1            -- 30 bits.
// The normal-mode table and the LMAX/RMAX tables needed for the shorter
// normal, escape type 1 and escape type 2 forms are those of the MPEG-4
// standard and are not part of this design. Latency: one cycle.
//
// From the published design: the escape type 3 code word layout. Own choice: every
// symbol uses that form (see above).
module huff_coder
  import mpeg4_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  rlc_sym_t  in_sym,
  output logic      in_rd,         // pop the RLC FIFO
  output logic      out_valid,
  output vlc_word_t out_word,
  input  logic      out_ready
);
  localparam logic [6:0] ESCAPE = 7'b0000011;

  assign in_rd = in_valid && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_rd) begin
        out_valid     <= 1'b1;
        out_word.code <= {2'b00, ESCAPE, 2'b11, in_sym.last, in_sym.run, 1'b1, in_sym.level, 1'b1};
        out_word.len  <= 6'd30;
      end
    end
  end
endmodule
