// tb_bus_arbiter: random VLC writes, ME reads and reconstructed-pixel writes
// against a bus that accepts at random. Checks every cycle that the bus
// carries the highest-priority request present (VLC, then ME, then the
// FIFOs), that each requester is acknowledged only when it is granted and
// the bus is ready, that reconstructed words leave each FIFO pair in the
// order written with their addresses, that the pair being filled reports
// full after FIFO_DEPTH words without draining, and that read data is passed
// back to the ME port.
//
// The priority order follows the design description. The FIFO-pair model and
// the random bus behaviour are the test's own.
module tb_bus_arbiter;
  localparam int D = 48, AW = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic vlc_req = 0, me_req = 0, recon_valid = 0, recon_swap = 0;
  logic [AW-1:0] vlc_addr = '0, me_addr = '0, recon_addr = '0;
  logic [31:0] vlc_data = '0, recon_data = '0;
  logic vlc_ack, me_ack, me_rvalid, recon_ready;
  logic [31:0] me_rdata;
  logic bus_req, bus_we, bus_ready = 0, bus_rvalid = 0;
  logic [AW-1:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata = '0;
  logic [1:0] grant;
  logic fifo_pending;

  bus_arbiter #(.FIFO_DEPTH(D), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW+31:0] q [2][$];
  logic wsel_m = 1'b0;
  logic rsel_m = 1'b0;   // model of the pair being drained
  int n_vlc = 0, n_me = 0, n_fifo = 0, n_full = 0, n_preempt = 0;

  always @(posedge clk) if (rst_n) begin
    logic rsel_n;
    rsel_n = (q[rsel_m].size() == 0 && q[~rsel_m].size() > 0) ? ~rsel_m : rsel_m;
    chk(recon_ready == (q[wsel_m].size() < D), "full flag");
    if (!recon_ready) n_full++;
    // priority
    if (vlc_req) chk(grant == 2'd1 && bus_we && bus_addr == vlc_addr && bus_wdata == vlc_data, "VLC first");
    else if (me_req) chk(grant == 2'd2 && !bus_we && bus_addr == me_addr, "ME second");
    else chk((grant == 2'd3) == (q[rsel_m].size() > 0), "FIFO last");
    chk(bus_req == (grant != 0), "bus_req");
    chk(fifo_pending == ((q[0].size() + q[1].size()) > 0), "fifo_pending");
    chk(vlc_ack == (vlc_req && bus_ready), "VLC ack");
    chk(me_ack == (!vlc_req && me_req && bus_ready), "ME ack");
    chk(me_rvalid == bus_rvalid && me_rdata == bus_rdata, "read return");
    if ((vlc_req || me_req) && (q[0].size() + q[1].size()) > 0) n_preempt++;
    if (grant == 2'd3 && bus_ready) begin
      logic [AW+31:0] e;
      e = q[rsel_m].pop_front();
      chk({bus_addr, bus_wdata} == e, "FIFO order");
      n_fifo++;
    end
    if (vlc_ack) n_vlc++;
    if (me_ack) n_me++;
    if (recon_valid && recon_ready) q[wsel_m].push_back({recon_addr, recon_data});
    if (recon_swap) wsel_m = ~wsel_m;
    rsel_m = rsel_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int phase;
      @(negedge clk);
      phase = (cyc / 2000) % 3;    // 0: busy bus, 1: FIFOs fill without draining, 2: mixed
      vlc_req  = (phase == 1) ? 1'b1 : (($urandom % 5) == 0);
      vlc_addr = AW'($urandom); vlc_data = $urandom;
      me_req   = ($urandom % 4) == 0;
      me_addr  = AW'($urandom);
      recon_valid = ($urandom % 3) == 0;
      recon_addr = AW'($urandom); recon_data = $urandom;
      recon_swap = (cyc % 700) == 699;
      bus_ready  = (phase == 1) ? 1'b0 : (($urandom % 4) != 0);
      bus_rvalid = ($urandom % 3) == 0; bus_rdata = $urandom;
    end
    chk(n_vlc > 0 && n_me > 0 && n_fifo > 0 && n_full > 0 && n_preempt > 0, "coverage");
    $display("VLC %0d, ME %0d, FIFO %0d words; FIFO full %0d cycles; preempted %0d cycles",
             n_vlc, n_me, n_fifo, n_full, n_preempt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
