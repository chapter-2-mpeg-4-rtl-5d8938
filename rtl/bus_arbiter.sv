// bus_arbiter: system bus access of the encoder, with the reconstruction
// FIFOs.
//
// Three requesters share one word-wide external bus: the VLC bitstream
// writes (highest priority), the motion unit reads (second) and the
// reconstructed-frame writes (lowest). Reconstructed data from the MC adder
// is not written directly: it goes into two pairs of FIFO_DEPTH x 32 FIFOs
// (each pair is an address FIFO and a data FIFO). One pair is filled while
// the other is drained; recon_swap (one per macroblock) switches the pair
// being filled. A pair is drained whenever the bus is not wanted by the VLC
// or the ME. recon_ready drops when the pair being filled is full.
// The bus handshake is valid/ready: a request is taken in the cycle
// bus_ready is high; read data returns later on bus_rvalid and is passed to
// the ME port.
//
// From the published design: the VLC > ME > reconstruction priority and the two
// pairs of 48x32 FIFOs that hold the reconstructed frame until the bus is free.
// Own choices: each pair is an address FIFO plus a data FIFO, the pairs work
// ping-pong, and the bus handshake is valid/ready.
module bus_arbiter #(
  parameter int unsigned FIFO_DEPTH = 48,
  parameter int unsigned AW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  // VLC bitstream writes
  input  logic          vlc_req,
  input  logic [AW-1:0] vlc_addr,
  input  logic [31:0]   vlc_data,
  output logic          vlc_ack,
  // motion unit reads
  input  logic          me_req,
  input  logic [AW-1:0] me_addr,
  output logic          me_ack,
  output logic          me_rvalid,
  output logic [31:0]   me_rdata,
  // reconstructed data
  input  logic          recon_valid,
  input  logic [AW-1:0] recon_addr,
  input  logic [31:0]   recon_data,
  output logic          recon_ready,
  input  logic          recon_swap,
  // external bus
  output logic          bus_req,
  output logic          bus_we,
  output logic [AW-1:0] bus_addr,
  output logic [31:0]   bus_wdata,
  input  logic          bus_ready,
  input  logic          bus_rvalid,
  input  logic [31:0]   bus_rdata,
  // grant, for observation (0 none, 1 VLC, 2 ME, 3 FIFO)
  output logic [1:0]    grant,
  output logic          fifo_pending   // reconstructed words are waiting
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic          wsel;          // pair being filled
  logic          rsel;          // pair being drained
  logic [1:0]    f_in_ready, f_out_valid, f_pop;
  logic [AW+31:0] f_out [2];
  logic [CW-1:0] f_count [2];

  for (genvar p = 0; p < 2; p++) begin : g_pair
    logic [CW-1:0] acount;
    logic a_ready, a_valid;
    logic [AW-1:0] a_out;
    logic d_ready, d_valid;
    logic [31:0] d_out;
    sync_fifo #(.WIDTH(AW), .DEPTH(FIFO_DEPTH)) u_afifo (
      .clk, .rst_n, .in_valid(recon_valid && wsel == p[0] && d_ready), .in_data(recon_addr),
      .in_ready(a_ready), .out_valid(a_valid), .out_data(a_out), .out_ready(f_pop[p]),
      .count(acount)
    );
    sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_dfifo (
      .clk, .rst_n, .in_valid(recon_valid && wsel == p[0] && a_ready), .in_data(recon_data),
      .in_ready(d_ready), .out_valid(d_valid), .out_data(d_out), .out_ready(f_pop[p]),
      .count(f_count[p])
    );
    assign f_in_ready[p]  = a_ready && d_ready;
    assign f_out_valid[p] = a_valid && d_valid;
    assign f_out[p]       = {a_out, d_out};
    // both FIFOs of a pair always move together
    assert property (@(posedge clk) disable iff (!rst_n) acount == f_count[p]);
  end

  assign recon_ready = f_in_ready[wsel];
  assign fifo_pending = |f_out_valid;

  always_comb begin
    grant = 2'd0;
    if (vlc_req)                grant = 2'd1;
    else if (me_req)            grant = 2'd2;
    else if (f_out_valid[rsel]) grant = 2'd3;
  end

  always_comb begin
    bus_req   = (grant != 2'd0);
    bus_we    = (grant != 2'd2);
    bus_addr  = '0;
    bus_wdata = '0;
    unique case (grant)
      2'd1: begin bus_addr = vlc_addr; bus_wdata = vlc_data; end
      2'd2: begin bus_addr = me_addr; end
      2'd3: begin bus_addr = f_out[rsel][AW+31:32]; bus_wdata = f_out[rsel][31:0]; end
      default: ;
    endcase
  end

  assign vlc_ack  = bus_ready && grant == 2'd1;
  assign me_ack   = bus_ready && grant == 2'd2;
  assign f_pop[0] = bus_ready && grant == 2'd3 && rsel == 1'b0;
  assign f_pop[1] = bus_ready && grant == 2'd3 && rsel == 1'b1;
  assign me_rvalid = bus_rvalid;
  assign me_rdata  = bus_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0;
    end else begin
      if (recon_swap) wsel <= ~wsel;
      // move to the other pair once this one is empty
      if (!f_out_valid[rsel] && f_out_valid[~rsel]) rsel <= ~rsel;
    end
  end
endmodule
