// rlc_fifo: symbol FIFO between run length coding and the Huff_coder.
//
// Whether a (level, run) symbol is the last of its block is only known when
// the run length coder reaches the block's last coefficient, which may be
// many cycles after the symbol was produced. The FIFO therefore stores
// (level, run, last, valid) registers addressed by write and read pointers
// and holds back its newest entry: the output is valid only while it holds
// at least two symbols, or when the head symbol's Last flag is set. A pulse on
// `last` sets the Last flag of the most recently written symbol (of the
// symbol being written, if wren is high in the same cycle).
// full and almost_full (DEPTH-1 entries) tell the run length coder to pause.
// Reading (rd) removes the head symbol in the same cycle it is presented.
//
// From the published design: the (Level, Run, Last, valid) registers, the late Last
// flag and the two-symbol valid rule. Own choice: a lone symbol whose Last
// flag is set may also leave, so a block always drains.
module rlc_fifo
  import mpeg4_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wren,
  input  coef_t      level,
  input  logic [5:0] run,
  input  logic       last,
  input  logic       rd,
  output logic       valid,
  output rlc_sym_t   sym,
  output logic       full,
  output logic       almost_full,
  output logic       empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  rlc_sym_t       mem   [DEPTH];
  logic           vld   [DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr, last_ptr;
  logic [PW:0]    count;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  logic do_wr, do_rd;
  assign do_rd = rd && valid;
  assign do_wr = wren && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; last_ptr <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
    end else begin
      // the read comes first: when full, a write may reuse the slot being read
      if (do_rd) begin
        vld[rd_ptr] <= 1'b0;
        rd_ptr      <= inc(rd_ptr);
      end
      if (do_wr) begin
        mem[wr_ptr] <= '{last: last, run: run, level: level};
        vld[wr_ptr] <= 1'b1;
        last_ptr    <= wr_ptr;
        wr_ptr      <= inc(wr_ptr);
      end else if (last && vld[last_ptr]) begin
        mem[last_ptr].last <= 1'b1;
      end
      count <= count + (PW+1)'(do_wr) - (PW+1)'(do_rd);
    end
  end

  assign sym         = mem[rd_ptr];
  assign valid       = (count >= 2) || (count == 1 && mem[rd_ptr].last);
  assign full        = (32'(count) == DEPTH);
  assign almost_full = (32'(count) >= DEPTH - 1);
  assign empty       = (count == 0);

  // a symbol must never be written while the FIFO is full and not read
  assert property (@(posedge clk) disable iff (!rst_n) wren |-> (!full || do_rd));
endmodule
