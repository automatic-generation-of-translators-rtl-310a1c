// tb_pkt2axi_ctrl: directed, self-checking test of the packet-to-AXI control
// unit alone, with PATH_BEATS = 2 (two 2-word bursts per request). Inputs
// are driven at the falling clock edge and the combinational outputs checked
// before the next rising edge.
// Scenario: an unknown 2-flit packet is consumed without effect; a RdReq16
// (TID 0x3C, SID 5, H 1) loads the address calculator when its address flit
// is taken, after which further packets are refused. Two AR requests follow
// (arlen 1, offsets 0 and 8), the first held one cycle by arready. The
// response is header (TID 0x3C), address flit (SID 5, H 1), then four data
// flits with CD 0..3, each offered only while the read FIFO has a word and
// each popping it. rready follows the FIFO's full flag. After the last data
// flit new requests are accepted again. A header with bad check bits raises
// ecc_err.
module tb_pkt2axi_ctrl;
  import pkt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              rx_valid, rx_ready, calc_load, arvalid, arready, rvalid, rready;
  flit_t             rx_flit;
  logic [11:0]       calc_offset;
  logic [7:0]        arlen;
  logic              rf_full, rf_empty, rf_push, rf_pop, tx_valid, tx_ready, tx_h, ecc_err;
  logic [1:0]        tx_sel;
  logic [TID_W-1:0]  tx_tid;
  logic [SID_W-1:0]  tx_sid;
  logic [CD_W-1:0]   tx_cd;

  pkt2axi_ctrl #(.PATH_BEATS(2)) dut (.*);

  int n_load = 0, n_ecc = 0, n_pop = 0;
  always @(posedge clk) if (rst_n) begin
    if (calc_load) n_load++;
    if (ecc_err)   n_ecc++;
    if (rf_pop)    n_pop++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  task automatic send_rx(input flit_t f, input logic exp_load);
    @(negedge clk);
    rx_valid = 1'b1;
    rx_flit  = f;
    #1;
    check(rx_ready, "request flit accepted");
    check(calc_load == exp_load, "calc_load");
    @(posedge clk);
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  initial begin
    flit_t h;
    rx_valid = 1'b0; rx_flit = '0; arready = 1'b0; rvalid = 1'b0;
    rf_full = 1'b0; rf_empty = 1'b1; tx_ready = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // unknown packet
    send_rx(make_hdr(6'd2, cmd_e'(8'd77), 8'd1), 1'b0);
    send_rx(make_data(32'h1234, 3'd0), 1'b0);
    @(negedge clk);
    #1 check(!arvalid && !tx_valid, "unknown packet starts nothing");
    // RdReq16 with bad header check bits
    h = make_hdr(LEN_RDREQ16, CMD_RDREQ16, 8'h3C);
    h[14] = ~h[14];
    send_rx(h, 1'b0);
    send_rx(make_addr(4'd5, 1'b1, 32'h2000), 1'b1);
    @(negedge clk);
    rx_valid = 1'b1;
    rx_flit  = make_hdr(LEN_RDREQ16, CMD_RDREQ16, 8'h01);
    #1;
    check(!rx_ready, "next request refused while serving");
    check(arvalid && arlen == 8'd1 && calc_offset == 12'd0, "first AR: arlen 1, offset 0");
    check(tx_valid && tx_sel == 2'd0 && tx_tid == 8'h3C, "response header offered");
    @(negedge clk);
    rx_valid = 1'b0;
    #1 check(arvalid && calc_offset == 12'd0, "first AR held while arready low");
    arready  = 1'b1;
    tx_ready = 1'b1;
    @(negedge clk);
    #1;
    check(arvalid && calc_offset == 12'd8, "second AR at offset 8");
    check(tx_valid && tx_sel == 2'd1 && tx_sid == 4'd5 && tx_h, "address flit offered with SID and H");
    @(negedge clk);
    #1;
    check(!arvalid, "two bursts only");
    check(!tx_valid && tx_sel == 2'd2, "no data flit while the FIFO is empty");
    // R data into the FIFO
    rvalid = 1'b1;
    rf_full = 1'b1;
    #1 check(!rready && !rf_push, "rready low while the FIFO is full");
    rf_full = 1'b0;
    #1 check(rready && rf_push, "R word pushed");
    rvalid = 1'b0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      rf_empty = 1'b0;
      #1;
      check(tx_valid && tx_sel == 2'd2 && tx_cd == 3'(i), $sformatf("data flit %0d offered", i));
      check(rf_pop, "data flit pops the FIFO");
      check(rx_ready == 1'b0, "still serving");
      @(posedge clk);
      @(negedge clk);
      rf_empty = 1'b1;
    end
    #1;
    check(!tx_valid, "response complete");
    check(rx_ready, "next request accepted again");
    check(n_load == 1 && n_pop == 4, "one load, four pops");
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
