// tb_translator_top: end-to-end test of both translators in translator_top,
// at the default parameters.
//
// An AXI read master and a packet memory (a2p_env) sit around the
// AXI-to-packet translator; a packet master and an AXI memory (p2a_env) sit
// around the packet-to-AXI translator. Both run at once with random stalls on
// every channel. Besides all the data and protocol checks of the two
// environments, this test counts how often each mechanism of the design
// happened and fails if one never did:
//   AXI to packet: AR held off while a burst is in progress, response flits
//   held off because the read-data FIFO is full, R stalled by the master,
//   request flits stalled by the packet IP, a burst split over several
//   packets, a last packet with unwanted words, an unknown packet dropped, a
//   check-bit error reported.
//   Packet to AXI: requests held off while one is served, AR stalled by the
//   slave, response flits stalled by the packet IP, an unknown packet
//   dropped, a check-bit error reported.
module tb_translator_top;
  import pkt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] a2p_araddr, p2a_araddr;
  logic [7:0]        a2p_arlen, p2a_arlen;
  logic              a2p_arvalid, a2p_arready, p2a_arvalid, p2a_arready;
  logic [DATA_W-1:0] a2p_rdata, p2a_rdata;
  logic              a2p_rvalid, a2p_rlast, a2p_rready, p2a_rvalid, p2a_rready;
  flit_t             a2p_tx_flit, a2p_rx_flit, p2a_tx_flit, p2a_rx_flit;
  logic              a2p_tx_valid, a2p_tx_ready, a2p_rx_valid, a2p_rx_ready, a2p_ecc_err;
  logic              p2a_tx_valid, p2a_tx_ready, p2a_rx_valid, p2a_rx_ready, p2a_ecc_err;

  translator_top dut (.*);

  a2p_env #(.NBURST(60), .EXTERNAL(1'b1)) ea (
    .clk, .rst_n,
    .x_araddr(a2p_araddr), .x_arlen(a2p_arlen), .x_arvalid(a2p_arvalid), .x_arready(a2p_arready),
    .x_rdata(a2p_rdata), .x_rvalid(a2p_rvalid), .x_rlast(a2p_rlast), .x_rready(a2p_rready),
    .x_tx_flit(a2p_tx_flit), .x_tx_valid(a2p_tx_valid), .x_tx_ready(a2p_tx_ready),
    .x_rx_flit(a2p_rx_flit), .x_rx_valid(a2p_rx_valid), .x_rx_ready(a2p_rx_ready),
    .x_ecc_err(a2p_ecc_err));

  p2a_env #(.PATH_BEATS(4), .NREQ(40), .EXTERNAL(1'b1)) ep (
    .clk, .rst_n,
    .x_rx_flit(p2a_rx_flit), .x_rx_valid(p2a_rx_valid), .x_rx_ready(p2a_rx_ready),
    .x_tx_flit(p2a_tx_flit), .x_tx_valid(p2a_tx_valid), .x_tx_ready(p2a_tx_ready),
    .x_araddr(p2a_araddr), .x_arlen(p2a_arlen), .x_arvalid(p2a_arvalid), .x_arready(p2a_arready),
    .x_rdata(p2a_rdata), .x_rvalid(p2a_rvalid), .x_rready(p2a_rready),
    .x_ecc_err(p2a_ecc_err));

  int checks, failures;

  task automatic seen(input string what, input int n);
    checks++;
    $display("  %-44s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ea.finished && ep.finished);
    checks   = ea.checks + ep.checks;
    failures = ea.failures + ep.failures;
    $display("mechanisms exercised:");
    seen("a2p AR held off during a burst",          ea.n_ar_stall);
    seen("a2p response held off, read FIFO full",   ea.n_rx_backpressure);
    seen("a2p R stalled by master",                 ea.n_r_stall);
    seen("a2p request flit stalled by packet IP",   ea.n_tx_stall);
    seen("a2p burst split over several packets",    ea.n_multi_pkt);
    seen("a2p last packet with unwanted words",     ea.n_partial_pkt);
    seen("a2p unknown packet dropped",              ea.unknown_sent);
    seen("a2p check-bit error reported",            ea.ecc_seen);
    seen("p2a request held off while serving",      ep.n_rx_blocked);
    seen("p2a AR stalled by AXI slave",             ep.n_ar_stall);
    seen("p2a response flit stalled by packet IP",  ep.n_tx_stall);
    seen("p2a unknown packet dropped",              ep.n_unknown);
    seen("p2a check-bit error reported",            ep.n_ecc_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ea.checks + ep.checks, ea.failures + ep.failures + 1);
    $finish;
  end

endmodule
