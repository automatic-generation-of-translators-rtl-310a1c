// p2a_env: test environment of one packet-to-AXI translator: a packet master
// model, an AXI read memory model and the checks on both, as clocked
// processes. Used by tb_pkt2axi_translator and tb_translator_top (which
// passes its own translator through the ports of mode EXTERNAL = 1).
module p2a_env
  import pkt_pkg::*;
#(
  parameter int unsigned PATH_BEATS = 4,
  parameter int          NREQ       = 30,
  parameter bit          EXTERNAL   = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  // connections to an external translator (EXTERNAL = 1)
  output flit_t             x_rx_flit,
  output logic              x_rx_valid,
  input  logic              x_rx_ready,
  input  flit_t             x_tx_flit,
  input  logic              x_tx_valid,
  output logic              x_tx_ready,
  input  logic [ADDR_W-1:0] x_araddr,
  input  logic [7:0]        x_arlen,
  input  logic              x_arvalid,
  output logic              x_arready,
  output logic [DATA_W-1:0] x_rdata,
  output logic              x_rvalid,
  input  logic              x_rready,
  input  logic              x_ecc_err
);

  flit_t             rx_flit, tx_flit;
  logic              rx_valid, rx_ready, tx_valid, tx_ready;
  logic [ADDR_W-1:0] araddr;
  logic [7:0]        arlen;
  logic              arvalid, arready;
  logic [DATA_W-1:0] rdata;
  logic              rvalid, rready, ecc_err;

  generate
    if (!EXTERNAL) begin : g_dut
      pkt2axi_translator #(.PATH_BEATS(PATH_BEATS)) dut (
        .clk, .rst_n, .rx_flit, .rx_valid, .rx_ready, .tx_flit, .tx_valid, .tx_ready,
        .araddr, .arlen, .arvalid, .arready, .rdata, .rvalid, .rready, .ecc_err);
    end else begin : g_ext
      assign rx_ready = x_rx_ready;
      assign tx_flit  = x_tx_flit;
      assign tx_valid = x_tx_valid;
      assign araddr   = x_araddr;
      assign arlen    = x_arlen;
      assign arvalid  = x_arvalid;
      assign rready   = x_rready;
      assign ecc_err  = x_ecc_err;
    end
  endgenerate
  assign x_rx_flit  = rx_flit;
  assign x_rx_valid = rx_valid;
  assign x_tx_ready = tx_ready;
  assign x_arready  = arready;
  assign x_rdata    = rdata;
  assign x_rvalid   = rvalid;

  int  checks = 0, failures = 0, cyc = 0, done = 0;
  logic finished = 1'b0;
  logic calm = 1'b1;
  // events seen, for the end-to-end test
  int  n_unknown = 0, n_ecc_inj = 0, n_ecc_seen = 0, n_ar_stall = 0, n_r_gap_stall = 0,
       n_tx_stall = 0, n_rx_blocked = 0, n_bursts = 0;
  int  addr_fire_cyc = -1, ar_fire_cyc = -1, hdr_fire_cyc = -1;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return a * 32'h9E37_79B1 + 32'h0123_4567;
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL p2a_env(PATH_BEATS=%0d) @%0d: %s", PATH_BEATS, cyc, msg);
    end
  endtask

  typedef struct { logic [7:0] tid; logic [3:0] sid; logic h; logic [31:0] addr; } req_t;
  req_t  exp_resp[$];
  req_t  exp_ar[$];
  flit_t flit_q[$];
  int    sent = 0, accepted = 0;

  // ---------------- packet master: requests ----------------
  always @(posedge clk) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_flit  <= '0;
    end else begin
      if (rx_valid && !rx_ready) n_rx_blocked++;
      if (rx_valid && rx_ready) begin
        accepted++;
        if (accepted == 2 && addr_fire_cyc < 0) addr_fire_cyc = cyc;
      end
      if (flit_q.size() == 0 && sent < NREQ && (sent == 0 || $urandom_range(0, 3) == 0)) begin
        req_t r;
        flit_t h;
        r.tid  = 8'($urandom);
        r.sid  = 4'($urandom);
        r.h    = 1'($urandom);
        r.addr = {28'($urandom), 4'b0000};
        if (sent > 0 && $urandom_range(0, 4) == 0) begin
          flit_q.push_back(make_hdr(6'd4, cmd_e'(8'd9), 8'h55));
          for (int i = 0; i < 3; i++) flit_q.push_back(make_data(32'($urandom), 3'(i)));
          n_unknown++;
        end
        h = make_hdr(LEN_RDREQ16, CMD_RDREQ16, r.tid);
        if (sent == 7) begin
          h[13] = ~h[13];
          n_ecc_inj++;
        end
        flit_q.push_back(h);
        flit_q.push_back(make_addr(r.sid, r.h, r.addr));
        exp_resp.push_back(r);
        for (int b = 0; b < 4 / int'(PATH_BEATS); b++) begin
          req_t a;
          a = r;
          a.addr = r.addr + 32'(4 * PATH_BEATS * b);
          exp_ar.push_back(a);
        end
        sent++;
      end
      if (!rx_valid || rx_ready) begin
        if (flit_q.size() > 0 && (calm || $urandom_range(0, 3) != 0)) begin
          rx_valid <= 1'b1;
          rx_flit  <= flit_q.pop_front();
        end else rx_valid <= 1'b0;
      end
    end
  end

  // ---------------- packet master: responses ----------------
  int tx_idx = 0;
  always @(posedge clk) begin
    if (!rst_n) tx_ready <= 1'b0;
    else begin
      tx_ready <= calm ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (tx_valid && !tx_ready) n_tx_stall++;
      if (tx_valid && tx_ready) begin
        if (exp_resp.size() == 0) check(1'b0, "response flit with no request");
        else begin
          req_t r;
          r = exp_resp[0];
          if (tx_idx == 0) begin
            hdr_flit_t h;
            h = hdr_flit_t'(tx_flit);
            if (hdr_fire_cyc < 0) hdr_fire_cyc = cyc;
            check(h.len == LEN_RDRESP16 && h.cmd == CMD_RDRESP16, "response header command/length");
            check(h.tid == r.tid, "response TID");
            check(hdr_ok(tx_flit), "response header check bits");
          end else if (tx_idx == 1) begin
            addr_flit_t a;
            a = addr_flit_t'(tx_flit);
            check(a.addr == r.addr && a.sid == r.sid && a.h == r.h, "response address flit");
            check(addr_ok(tx_flit), "response address check bits");
          end else begin
            data_flit_t d;
            d = data_flit_t'(tx_flit);
            check(d.data == mem_word(r.addr + 32'(4 * (tx_idx - 2))),
                  $sformatf("response data %h expected %h", d.data, mem_word(r.addr + 32'(4 * (tx_idx - 2)))));
            check(d.cd == 3'(tx_idx - 2), "response CD index");
            check(data_ok(tx_flit), "response data check bits");
          end
          if (tx_idx == 5) begin
            tx_idx = 0;
            void'(exp_resp.pop_front());
            done++;
            calm = 1'b0;
          end else tx_idx++;
        end
      end
    end
  end

  // ---------------- AXI memory ----------------
  logic [31:0] burst_addr[$];
  int          beat = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      arready <= 1'b0;
      rvalid  <= 1'b0;
      rdata   <= '0;
    end else begin
      arready <= calm ? 1'b1 : ($urandom_range(0, 2) != 0);
      if (arvalid && !arready) n_ar_stall++;
      if (arvalid && arready) begin
        if (ar_fire_cyc < 0) ar_fire_cyc = cyc;
        n_bursts++;
        check(arlen == 8'(PATH_BEATS - 1), "arlen");
        if (exp_ar.size() > 0) begin
          check(araddr == exp_ar[0].addr, $sformatf("araddr %h expected %h", araddr, exp_ar[0].addr));
          void'(exp_ar.pop_front());
        end else check(1'b0, "unexpected AR");
        for (int i = 0; i <= int'(arlen); i++) burst_addr.push_back(araddr + 32'(4 * i));
      end
      if (rvalid && !rready) n_r_gap_stall++;
      if (!rvalid || rready) begin
        if (burst_addr.size() > 0 && (calm || $urandom_range(0, 3) != 0)) begin
          rvalid <= 1'b1;
          rdata  <= mem_word(burst_addr.pop_front());
        end else rvalid <= 1'b0;
      end
    end
  end

  always @(posedge clk) if (rst_n && ecc_err) n_ecc_seen++;

  initial begin
    wait (done == NREQ);
    repeat (10) @(posedge clk);
    check(exp_ar.size() == 0 && burst_addr.size() == 0, "all bursts consumed");
    check(n_ecc_seen == n_ecc_inj && n_ecc_inj == 1, $sformatf("ecc_err pulses %0d", n_ecc_seen));
    check(ar_fire_cyc - addr_fire_cyc == 1, $sformatf("address flit to AR: %0d cycles", ar_fire_cyc - addr_fire_cyc));
    check(hdr_fire_cyc - addr_fire_cyc == 1, $sformatf("address flit to response header: %0d cycles", hdr_fire_cyc - addr_fire_cyc));
    check(n_unknown > 0, "unknown packets were exercised");
    finished = 1'b1;
  end

endmodule
