// axi2pkt_ctrl: control unit of the AXI-to-packet read translator.
//
// The integrated state machine of the translator. It runs three state
// machines side by side, one per independent channel, and issues all control
// to the IPs, the FIFOs, the multiplexer and the address calculator:
//   * request: for an AXI burst of arlen+1 words it sends ceil((arlen+1)/4)
//     RdReq16 packets (header flit, then address flit). Packet k carries
//     TID k and the address base + 16*k, which the address calculator forms
//     from the offset this unit drives.
//   * response: it walks each incoming packet by its header. For a RdResp16 it
//     skips the address flit and pushes the data words of the four data flits
//     into the read-data FIFO, keeping only the words the burst asked for
//     (the last packet of a burst whose length is not a multiple of four
//     carries words nobody wants). Any other command is consumed for LEN
//     flits and dropped. The packet IP is stalled (rx_ready low) while the
//     FIFO is full and a wanted word waits.
//   * read data: it counts the words the AXI master takes and marks the last.
// One burst (a "transaction sequence") is handled at a time: the AR FIFO holds
// it until its last word is read and its last response flit has arrived,
// which keeps arready low meanwhile. The data
// dependence of read data on its address is met because a packet's words are
// only expected after its request has been sent. Responses are assumed to come
// back in request order. Any accepted flit whose check bits are wrong raises
// ecc_err for one cycle; it is reported, not corrected.
// Timing: sel/offset/tx_valid are combinational from the state; a flit moves
// on a cycle where valid and ready are both high. Reset: asynchronous, active
// low. Structure (one control unit driving FIFO push/pop, mux select and
// address offset per state) follows the translator architecture; state
// encoding, counters and the rules above are this design's choices.
module axi2pkt_ctrl
  import pkt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AR FIFO (holds the current burst)
  input  logic              ar_empty,
  input  logic [7:0]        ar_len,
  output logic              ar_pop,
  // address calculator
  output logic              calc_load,
  output logic [11:0]       calc_offset,
  // packet transmit side (requests)
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [0:0]        tx_sel,     // 0: header flit, 1: address flit
  output logic [TID_W-1:0]  tx_tid,
  // packet receive side (responses)
  input  logic              rx_valid,
  input  flit_t             rx_flit,
  output logic              rx_ready,
  // read-data FIFO
  input  logic              rf_full,
  output logic              rf_push,
  // AXI R channel
  input  logic              r_fire,
  output logic              r_last,
  // status
  output logic              ecc_err
);

  typedef enum logic [1:0] {RQ_IDLE, RQ_HDR, RQ_ADDR, RQ_DONE} rq_state_e;
  typedef enum logic [1:0] {RX_HDR, RX_ADDR, RX_DATA, RX_SKIP} rx_state_e;

  rq_state_e   rq_state;
  rx_state_e   rx_state;
  logic [7:0]  rq_pkt;       // index of the request packet being sent
  logic [7:0]  rq_last;      // index of the last request packet of the burst
  logic [8:0]  rx_word;      // words received so far in this burst
  logic [2:0]  rx_sub;       // data flit within the current response
  logic [5:0]  rx_left;      // flits left to skip of an unknown packet
  logic [8:0]  r_beat;       // words given to the AXI master so far
  logic        busy;         // a burst has been taken from the AR FIFO
  logic        r_done;       // the master has taken the last word
  logic        rx_all;       // every response flit of the burst has arrived

  hdr_flit_t   rx_hdr;
  logic        tx_fire, rx_fire, word_wanted;

  assign rx_hdr   = hdr_flit_t'(rx_flit);
  assign tx_fire  = tx_valid && tx_ready;
  assign rx_fire  = rx_valid && rx_ready;

  // ---------------- request state machine ----------------
  assign calc_load   = (rq_state == RQ_IDLE) && !ar_empty && !busy;
  assign tx_valid    = (rq_state == RQ_HDR) || (rq_state == RQ_ADDR);
  assign tx_sel      = (rq_state == RQ_ADDR) ? 1'b1 : 1'b0;
  assign tx_tid      = rq_pkt;
  assign calc_offset = {rq_pkt[7:0], 4'b0000};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_state <= RQ_IDLE;
      rq_pkt   <= '0;
      rq_last  <= '0;
      busy     <= 1'b0;
    end else begin
      unique case (rq_state)
        RQ_IDLE: if (calc_load) begin
          rq_state <= RQ_HDR;
          rq_pkt   <= '0;
          rq_last  <= {2'b00, ar_len[7:2]};
          busy     <= 1'b1;
        end
        RQ_HDR:  if (tx_fire) rq_state <= RQ_ADDR;
        RQ_ADDR: if (tx_fire) begin
          if (rq_pkt == rq_last) rq_state <= RQ_DONE;
          else begin
            rq_pkt   <= rq_pkt + 1'b1;
            rq_state <= RQ_HDR;
          end
        end
        RQ_DONE: if (ar_pop) begin
          rq_state <= RQ_IDLE;
          busy     <= 1'b0;
        end
        default: rq_state <= RQ_IDLE;
      endcase
    end
  end

  // ---------------- response state machine ----------------
  assign word_wanted = busy && (rx_word <= {1'b0, ar_len});
  always_comb begin
    rx_ready = 1'b1;
    if (rx_state == RX_DATA && word_wanted && rf_full) rx_ready = 1'b0;
  end
  assign rf_push = rx_fire && (rx_state == RX_DATA) && word_wanted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state <= RX_HDR;
      rx_word  <= '0;
      rx_sub   <= '0;
      rx_left  <= '0;
    end else begin
      if (calc_load) rx_word <= '0;
      if (rx_fire) begin
        unique case (rx_state)
          RX_HDR: begin
            if (rx_hdr.cmd == CMD_RDRESP16) rx_state <= RX_ADDR;
            else if (rx_hdr.len > 6'd1) begin
              rx_left  <= rx_hdr.len - 6'd1;
              rx_state <= RX_SKIP;
            end
          end
          RX_ADDR: begin
            rx_state <= RX_DATA;
            rx_sub   <= '0;
          end
          RX_DATA: begin
            rx_word <= rx_word + 1'b1;
            if (rx_sub == 3'(PKT_WORDS - 1)) rx_state <= RX_HDR;
            else rx_sub <= rx_sub + 1'b1;
          end
          RX_SKIP: begin
            rx_left <= rx_left - 1'b1;
            if (rx_left == 6'd1) rx_state <= RX_HDR;
          end
          default: rx_state <= RX_HDR;
        endcase
      end
    end
  end

  always_comb begin
    ecc_err = 1'b0;
    if (rx_fire) begin
      unique case (rx_state)
        RX_HDR:  ecc_err = !hdr_ok(rx_flit);
        RX_ADDR: ecc_err = !addr_ok(rx_flit);
        RX_DATA: ecc_err = !data_ok(rx_flit);
        default: ecc_err = 1'b0;
      endcase
    end
  end

  // ---------------- read-data state machine ----------------
  // The sequence ends when the master has its last word and every flit of
  // every response has arrived (the last packet may carry unwanted words that
  // arrive after the last wanted one was read).
  assign r_last = (r_beat == {1'b0, ar_len});
  assign rx_all = (rx_word == {rq_last[6:0] + 7'd1, 2'b00});
  assign ar_pop = busy && rx_all && (r_done || (r_fire && r_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_beat <= '0;
      r_done <= 1'b0;
    end else if (ar_pop) begin
      r_beat <= '0;
      r_done <= 1'b0;
    end else if (r_fire) begin
      r_beat <= r_beat + 1'b1;
      if (r_last) r_done <= 1'b1;
    end
  end

  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              tx_valid && !tx_ready |=> tx_valid && $stable(tx_sel) && $stable(tx_tid))
    else $error("axi2pkt_ctrl: request flit withdrawn before it was taken");

endmodule
