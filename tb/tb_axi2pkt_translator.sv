// tb_axi2pkt_translator: self-checking test of the AXI-to-packet translator.
//
// The environment a2p_env models an AXI read master and a packet-protocol
// memory around the translator. Bursts of random length (1..20 words) give
// single- and multi-packet bursts with full and partial last packets; R,
// requests and responses are stalled at random; one 256-word burst takes 64
// packets; unknown packets must be
// dropped and one corrupted data flit must raise ecc_err. Checks: every
// request header and address flit (command, length, TID, address base+16k,
// check bits), every R word and rlast, the ecc_err count, and two latencies of
// an unstalled first burst: AR handshake to first request flit = 2 cycles,
// data flit to R word = 1 cycle.
module tb_axi2pkt_translator;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // the environment instantiates the translator itself; its ports for an
  // outside translator stay open
  a2p_env #(.NBURST(40)) env (
    .clk, .rst_n,
    .x_araddr(), .x_arlen(), .x_arvalid(), .x_arready(1'b0), .x_rdata('0), .x_rvalid(1'b0),
    .x_rlast(1'b0), .x_rready(), .x_tx_flit('0), .x_tx_valid(1'b0), .x_tx_ready(),
    .x_rx_flit(), .x_rx_valid(), .x_rx_ready(1'b0), .x_ecc_err(1'b0));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (env.finished);
    $display("bursts=%0d responses=%0d unknown=%0d", env.bursts_done, env.resp_cnt, env.unknown_sent);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired (%0d bursts done)", env.bursts_done);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end

endmodule
