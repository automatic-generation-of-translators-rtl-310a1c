// a2p_env: test environment of one AXI-to-packet translator: an AXI read
// master model, a packet-protocol memory model and the checks on both, as
// clocked processes. The master issues NBURST bursts of random length
// (1..20 words, plus one 256-word burst, the longest AXI allows) and stalls
// R at random; the memory stalls requests at random,
// answers each RdReq16 with a RdResp16 of mem_word(address) words, slips in
// unknown packets that must be dropped and corrupts the check bits of one
// data flit. The first burst runs without stalls to measure latencies. Used by
// tb_axi2pkt_translator and, with EXTERNAL = 1 (translator outside, wired
// through the x_* ports), by tb_translator_top. Sets finished when all bursts
// are read and the end-of-test checks are done.
module a2p_env
  import pkt_pkg::*;
#(
  parameter int NBURST   = 40,
  parameter bit EXTERNAL = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] x_araddr,
  output logic [7:0]        x_arlen,
  output logic              x_arvalid,
  input  logic              x_arready,
  input  logic [DATA_W-1:0] x_rdata,
  input  logic              x_rvalid,
  input  logic              x_rlast,
  output logic              x_rready,
  input  flit_t             x_tx_flit,
  input  logic              x_tx_valid,
  output logic              x_tx_ready,
  output flit_t             x_rx_flit,
  output logic              x_rx_valid,
  input  logic              x_rx_ready,
  input  logic              x_ecc_err
);

  logic [ADDR_W-1:0] araddr;
  logic [7:0]        arlen;
  logic              arvalid, arready;
  logic [DATA_W-1:0] rdata;
  logic              rvalid, rlast, rready;
  flit_t             tx_flit, rx_flit;
  logic              tx_valid, tx_ready, rx_valid, rx_ready, ecc_err;

  generate
    if (!EXTERNAL) begin : g_dut
      axi2pkt_translator dut (
        .clk, .rst_n, .araddr, .arlen, .arvalid, .arready, .rdata, .rvalid, .rlast, .rready,
        .tx_flit, .tx_valid, .tx_ready, .rx_flit, .rx_valid, .rx_ready, .ecc_err);
    end else begin : g_ext
      assign arready  = x_arready;
      assign rdata    = x_rdata;
      assign rvalid   = x_rvalid;
      assign rlast    = x_rlast;
      assign tx_flit  = x_tx_flit;
      assign tx_valid = x_tx_valid;
      assign rx_ready = x_rx_ready;
      assign ecc_err  = x_ecc_err;
    end
  endgenerate
  assign x_araddr   = araddr;
  assign x_arlen    = arlen;
  assign x_arvalid  = arvalid;
  assign x_rready   = rready;
  assign x_tx_ready = tx_ready;
  assign x_rx_flit  = rx_flit;
  assign x_rx_valid = rx_valid;

  logic finished = 1'b0;
  // events seen, for the end-to-end test
  int n_max_burst = 0;
  int n_ar_stall = 0, n_rx_backpressure = 0, n_r_stall = 0, n_tx_stall = 0,
      n_multi_pkt = 0, n_partial_pkt = 0;
  always @(posedge clk) if (rst_n) begin
    if (arvalid && !arready) n_ar_stall++;
    if (rx_valid && !rx_ready) n_rx_backpressure++;
    if (rvalid && !rready) n_r_stall++;
    if (tx_valid && !tx_ready) n_tx_stall++;
    if (arvalid && arready && arlen >= 8'd4) n_multi_pkt++;
    if (arvalid && arready && arlen == 8'd255) n_max_burst++;
    if (arvalid && arready && arlen[1:0] != 2'b11) n_partial_pkt++;
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return a * 32'h9E37_79B1 + 32'h0123_4567;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL a2p_env @%0d: %s", cyc, msg);
    end
  endtask

  // ---------------- AXI master ----------------
  logic [31:0] exp_r[$];
  logic        exp_last[$];
  typedef struct { logic [7:0] tid; logic [31:0] addr; } req_t;
  req_t        exp_req[$];
  int          issued = 0, bursts_done = 0, r_hold = 0;
  logic        calm;          // first burst: no stalls anywhere
  int          ar_fire_cyc = -1, first_tx_cyc = -1, first_data_cyc = -1, first_r_cyc = -1;

  always @(posedge clk) begin
    if (!rst_n) begin
      arvalid <= 1'b0;
      rready  <= 1'b0;
      araddr  <= '0;
      arlen   <= '0;
    end else begin
      // random single-cycle stalls, and now and then a long one that fills the read FIFO
      if (r_hold > 0) begin
        r_hold <= r_hold - 1;
        rready <= 1'b0;
      end else if (!calm && $urandom_range(0, 15) == 0) begin
        r_hold <= 8;
        rready <= 1'b0;
      end else rready <= calm ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (arvalid && arready) begin
        arvalid <= 1'b0;
        if (ar_fire_cyc < 0) ar_fire_cyc = cyc;
        for (int i = 0; i <= int'(arlen); i++) begin
          exp_r.push_back(mem_word(araddr + 32'(4 * i)));
          exp_last.push_back(i == int'(arlen));
        end
        for (int k = 0; k <= int'(arlen) / 4; k++)
          exp_req.push_back('{tid: 8'(k), addr: araddr + 32'(16 * k)});
      end else if (!arvalid && issued < NBURST && (issued == 0 || $urandom_range(0, 2) == 0)) begin
        arvalid <= 1'b1;
        araddr  <= {30'($urandom), 2'b00};
        arlen   <= (issued == 0) ? 8'd3 : (issued == 5) ? 8'd255 : 8'($urandom_range(0, 19));
        issued  <= issued + 1;
      end
      if (rvalid && rready) begin
        if (first_r_cyc < 0) first_r_cyc = cyc;
        if (exp_r.size() == 0) check(1'b0, "R word with nothing expected");
        else begin
          check(rdata == exp_r[0], $sformatf("rdata %h expected %h", rdata, exp_r[0]));
          check(rlast == exp_last[0], "rlast");
          if (exp_last[0]) begin
            bursts_done++;
            calm = 1'b0;
          end
          void'(exp_r.pop_front());
          void'(exp_last.pop_front());
        end
      end
    end
  end

  // ---------------- packet memory ----------------
  logic        tx_is_addr;
  logic [31:0] resp_q[$];
  logic [7:0]  resp_tid_q[$];
  flit_t       flit_q[$];
  int          resp_cnt = 0, unknown_sent = 0, ecc_injected = 0, ecc_seen = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      tx_ready   <= 1'b0;
      tx_is_addr <= 1'b0;
      rx_valid   <= 1'b0;
      rx_flit    <= '0;
    end else begin
      tx_ready <= calm ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (tx_valid && tx_ready) begin
        if (first_tx_cyc < 0) first_tx_cyc = cyc;
        if (!tx_is_addr) begin
          hdr_flit_t h;
          h = hdr_flit_t'(tx_flit);
          check(h.cmd == CMD_RDREQ16 && h.len == LEN_RDREQ16, "request header command/length");
          check(hdr_ok(tx_flit), "request header check bits");
          check(exp_req.size() > 0 && h.tid == exp_req[0].tid, "request TID");
          resp_tid_q.push_back(h.tid);
        end else begin
          addr_flit_t a;
          a = addr_flit_t'(tx_flit);
          check(addr_ok(tx_flit), "request address check bits");
          if (exp_req.size() > 0) begin
            check(a.addr == exp_req[0].addr, $sformatf("request address %h expected %h", a.addr, exp_req[0].addr));
            void'(exp_req.pop_front());
          end else check(1'b0, "unexpected request");
          resp_q.push_back(a.addr);
        end
        tx_is_addr <= !tx_is_addr;
      end
      // build the next response
      if (flit_q.size() == 0 && resp_q.size() > 0) begin
        logic [31:0] a;
        if (!calm && $urandom_range(0, 5) == 0) begin
          flit_q.push_back(make_hdr(6'd3, cmd_e'(8'd7), 8'hEE));
          flit_q.push_back(make_data(32'hDEAD_BEEF, 3'd0));
          flit_q.push_back(make_data(32'hBAD0_BAD0, 3'd1));
          unknown_sent++;
        end
        a = resp_q.pop_front();
        flit_q.push_back(make_hdr(LEN_RDRESP16, CMD_RDRESP16, resp_tid_q.pop_front()));
        flit_q.push_back(make_addr(4'd2, 1'b0, a));
        for (int i = 0; i < 4; i++) begin
          flit_t f;
          f = make_data(mem_word(a + 32'(4 * i)), 3'(i));
          if (resp_cnt == 5 && i == 1) begin
            f[0] = ~f[0];
            ecc_injected++;
          end
          flit_q.push_back(f);
        end
        resp_cnt++;
      end
      if (!rx_valid || rx_ready) begin
        if (flit_q.size() > 0 && (calm || $urandom_range(0, 3) != 0)) begin
          rx_valid <= 1'b1;
          rx_flit  <= flit_q.pop_front();
        end else rx_valid <= 1'b0;
      end
    end
  end

  // first accepted data flit of the unstalled burst (flit 3 of the first response)
  int rx_accepted = 0;
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) begin
    rx_accepted <= rx_accepted + 1;
    if (rx_accepted == 2) first_data_cyc = cyc;
  end
  always @(posedge clk) if (rst_n && ecc_err) ecc_seen++;

  initial begin
    calm = 1'b1;
    wait (bursts_done == NBURST);
    repeat (10) @(posedge clk);
    check(exp_r.size() == 0 && exp_req.size() == 0, "all words and requests consumed");
    check(first_tx_cyc - ar_fire_cyc == 2, $sformatf("AR to first request flit: %0d cycles", first_tx_cyc - ar_fire_cyc));
    check(first_r_cyc - first_data_cyc == 1, $sformatf("data flit to R word: %0d cycles", first_r_cyc - first_data_cyc));
    check(ecc_seen == ecc_injected && ecc_injected == 1, $sformatf("ecc_err pulses %0d", ecc_seen));
    check(unknown_sent > 0, "unknown packets were exercised");
    check(NBURST <= 5 || n_max_burst == 1, "a 256-word burst (64 packets) was run");
    finished = 1'b1;
  end

endmodule
