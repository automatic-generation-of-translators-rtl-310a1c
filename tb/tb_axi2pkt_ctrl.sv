// tb_axi2pkt_ctrl: directed, self-checking test of the AXI-to-packet control
// unit alone. Inputs are driven at the falling clock edge and the
// combinational outputs checked before the next rising edge.
// Scenario: a burst of 6 words (arlen 5) waits in the AR FIFO. Expected: one
// calc_load, then four request flits (header TID 0, address offset 0, header
// TID 1, address offset 16) with one cycle of tx_ready low in between; then
// two RdResp16 packets and one unknown 3-flit packet between them. Words 0..5
// must be pushed, words 6 and 7 dropped; with the read FIFO full a wanted
// data flit is refused (rx_ready low) but an unwanted one is not. R takes six
// words, the sixth with r_last, and ar_pop comes only once both the last word
// is read and the last flit has arrived. A data flit with bad check bits
// raises ecc_err.
module tb_axi2pkt_ctrl;
  import pkt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              ar_empty, ar_pop, calc_load, tx_valid, tx_ready, rx_valid, rx_ready;
  logic [7:0]        ar_len;
  logic [11:0]       calc_offset;
  logic [0:0]        tx_sel;
  logic [TID_W-1:0]  tx_tid;
  flit_t             rx_flit;
  logic              rf_full, rf_push, r_fire, r_last, ecc_err;

  axi2pkt_ctrl dut (.*);

  int n_push = 0, n_pop = 0, n_load = 0, n_ecc = 0;
  always @(posedge clk) if (rst_n) begin
    if (rf_push)   n_push++;
    if (ar_pop)    n_pop++;
    if (calc_load) n_load++;
    if (ecc_err)   n_ecc++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // one request flit: wait until offered, then take it
  task automatic take_tx(input logic sel, input logic [7:0] tid, input logic [11:0] off);
    @(negedge clk);
    tx_ready = 1'b1;
    #1;
    check(tx_valid, "request flit offered");
    check(tx_sel == sel, $sformatf("tx_sel %0d expected %0d", tx_sel, sel));
    check(tx_tid == tid, "tx_tid");
    if (sel) check(calc_offset == off, $sformatf("offset %0d expected %0d", calc_offset, off));
    @(posedge clk);
    @(negedge clk);
    tx_ready = 1'b0;
  endtask

  // one response flit, accepted on the next rising edge
  task automatic send_rx(input flit_t f, input logic exp_push);
    @(negedge clk);
    rx_valid = 1'b1;
    rx_flit  = f;
    #1;
    check(rx_ready, "response flit accepted");
    check(rf_push == exp_push, $sformatf("rf_push %0d expected %0d", rf_push, exp_push));
    @(posedge clk);
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  task automatic read_r(input logic exp_last, input logic exp_pop);
    @(negedge clk);
    r_fire = 1'b1;
    #1;
    check(r_last == exp_last, "r_last");
    check(ar_pop == exp_pop, $sformatf("ar_pop %0d expected %0d", ar_pop, exp_pop));
    @(posedge clk);
    @(negedge clk);
    r_fire = 1'b0;
  endtask

  initial begin
    flit_t bad;
    ar_empty = 1'b1; ar_len = 8'd5; tx_ready = 1'b0; rx_valid = 1'b0; rx_flit = '0;
    rf_full = 1'b0; r_fire = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ar_empty = 1'b0;
    #1 check(calc_load, "calc_load when a burst is waiting");
    // requests, with a stall of the packet IP between them
    take_tx(1'b0, 8'd0, 12'd0);
    take_tx(1'b1, 8'd0, 12'd0);
    @(negedge clk);
    #1 check(tx_valid && !tx_ready, "request held while the packet IP stalls");
    take_tx(1'b0, 8'd1, 12'd0);
    take_tx(1'b1, 8'd1, 12'd16);
    @(negedge clk);
    #1 check(!tx_valid, "no further requests");
    // first response: words 0..3; word 1 first meets a full FIFO
    send_rx(make_hdr(LEN_RDRESP16, CMD_RDRESP16, 8'd0), 1'b0);
    send_rx(make_addr(4'd0, 1'b0, 32'h100), 1'b0);
    send_rx(make_data(32'd0, 3'd0), 1'b1);
    @(negedge clk);
    rf_full  = 1'b1;
    rx_valid = 1'b1;
    rx_flit  = make_data(32'd1, 3'd1);
    #1 check(!rx_ready && !rf_push, "wanted word refused while the FIFO is full");
    @(negedge clk);
    rf_full  = 1'b0;
    rx_valid = 1'b0;
    send_rx(make_data(32'd1, 3'd1), 1'b1);
    bad = make_data(32'd2, 3'd2);
    bad[1] = ~bad[1];
    send_rx(bad, 1'b1);
    send_rx(make_data(32'd3, 3'd3), 1'b1);
    // unknown packet: consumed, nothing pushed
    send_rx(make_hdr(6'd3, cmd_e'(8'd42), 8'd9), 1'b0);
    send_rx(make_data(32'hAAAA, 3'd0), 1'b0);
    send_rx(make_data(32'hBBBB, 3'd1), 1'b0);
    // R takes the first five words meanwhile
    for (int i = 0; i < 5; i++) read_r(1'b0, 1'b0);
    // second response: words 4, 5 wanted, 6, 7 not
    send_rx(make_hdr(LEN_RDRESP16, CMD_RDRESP16, 8'd1), 1'b0);
    send_rx(make_addr(4'd0, 1'b0, 32'h110), 1'b0);
    send_rx(make_data(32'd4, 3'd0), 1'b1);
    send_rx(make_data(32'd5, 3'd1), 1'b1);
    // last word read before the unwanted flits arrive: no ar_pop yet
    read_r(1'b1, 1'b0);
    @(negedge clk);
    rf_full  = 1'b1;
    rx_valid = 1'b1;
    rx_flit  = make_data(32'd6, 3'd2);
    #1 check(rx_ready && !rf_push, "unwanted word taken and dropped even with a full FIFO");
    @(posedge clk);
    @(negedge clk);
    rf_full  = 1'b0;
    rx_valid = 1'b1;
    rx_flit  = make_data(32'd7, 3'd3);
    #1 check(!ar_pop, "no ar_pop before the last flit");
    @(posedge clk);
    @(negedge clk);
    rx_valid = 1'b0;
    #1 check(ar_pop, "ar_pop once the last flit has arrived");
    @(posedge clk);
    @(negedge clk);
    ar_empty = 1'b1;
    repeat (3) @(posedge clk);
    check(n_push == 6, $sformatf("%0d words pushed", n_push));
    check(n_pop == 1 && n_load == 1, "one burst loaded and retired");
    check(n_ecc == 1, "ecc_err once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
