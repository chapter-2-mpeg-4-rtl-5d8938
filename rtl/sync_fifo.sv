// sync_fifo: single-clock FIFO with valid/ready on both sides.
// DEPTH entries of WIDTH bits in a register array; in_ready is low when full,
// out_valid is high when not empty; the head entry is presented
// combinationally. Used as the packer input buffer and the reconstruction
// FIFOs.
//
// Own design (generic helper).
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_w, do_r;
  assign in_ready  = (32'(count) < DEPTH);
  assign out_valid = (count != 0);
  assign do_w = in_valid && in_ready;
  assign do_r = out_valid && out_ready;
  assign out_data = mem[rp];
  always_ff @(posedge clk) begin
    if (do_w) mem[wp] <= in_data;
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_w) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_r) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_w) - ($clog2(DEPTH+1))'(do_r);
    end
  end
endmodule
