// tb_pkt2axi_translator: self-checking test of the packet-to-AXI translator.
//
// Two copies of the translator are tested at once: one at the default path
// (a single 4-word AXI burst per 16-byte request) and one with PATH_BEATS = 1
// (four 1-word bursts, the smallest-area path). Each copy has its own
// packet master and AXI memory model, written as clocked processes: the
// master sends RdReq16 requests with random TID, SID, H and address, slips in
// unknown packets that must be dropped and one request with corrupted header
// check bits, and stalls responses at random; the memory stalls AR and R at
// random and returns mem_word(address). Checks: AR address/length of every
// burst, every response flit (length, command, TID, SID, H, address, data,
// CD index, check bits), the ecc_err count, and the latency of an unstalled
// first request: address flit taken to AR handshake = 1 cycle, and to the
// response header = 1 cycle.
module tb_pkt2axi_translator;
  import pkt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int done_total = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  // each environment instantiates its own translator; the ports for an
  // outside translator stay open
  p2a_env #(.PATH_BEATS(4), .NREQ(30)) env4 (
    .clk, .rst_n,
    .x_rx_flit(), .x_rx_valid(), .x_rx_ready(1'b0), .x_tx_flit('0), .x_tx_valid(1'b0),
    .x_tx_ready(), .x_araddr('0), .x_arlen('0), .x_arvalid(1'b0), .x_arready(), .x_rdata(),
    .x_rvalid(), .x_rready(1'b0), .x_ecc_err(1'b0));
  p2a_env #(.PATH_BEATS(1), .NREQ(30)) env1 (
    .clk, .rst_n,
    .x_rx_flit(), .x_rx_valid(), .x_rx_ready(1'b0), .x_tx_flit('0), .x_tx_valid(1'b0),
    .x_tx_ready(), .x_araddr('0), .x_arlen('0), .x_arvalid(1'b0), .x_arready(), .x_rdata(),
    .x_rvalid(), .x_rready(1'b0), .x_ecc_err(1'b0));

  initial begin
    wait (env4.finished && env1.finished);
    repeat (5) @(posedge clk);
    checks   = env4.checks + env1.checks;
    failures = env4.failures + env1.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired (%0d/%0d done)", env4.done, env1.done);
    $display("TB_RESULT checks=%0d failures=%0d", env4.checks + env1.checks,
             env4.failures + env1.failures + 1);
    $finish;
  end

endmodule
