// pkt2axi_ctrl: control unit of the packet-to-AXI read translator.
//
// The integrated state machine of the translator, made of three state
// machines that run side by side:
//   * request: walks incoming packets by their header. A RdReq16 (header,
//     address flit) starts a transaction sequence: its TID, SID and H are
//     kept, its address is loaded into the address calculator, and no further
//     packet is accepted (rx_ready low) until the response has been sent.
//     Packets with any other command are consumed for LEN flits and dropped.
//   * AXI read: satisfies the 16 bytes of the request with 4/PATH_BEATS AXI
//     bursts of PATH_BEATS words each (arlen = PATH_BEATS-1), burst b at
//     address base + 4*PATH_BEATS*b. PATH_BEATS = 4 is the single 16-byte
//     burst, the lowest-latency path and the default choice; 1 and 2 are the
//     smaller-area alternatives of the path selection. The read-data FIFO
//     takes R words whenever it has room (rready = FIFO not full).
//   * response: sends RdResp16: header (LEN 6, CMD 1, the request's TID),
//     address flit (the request's SID, H and address), then four data flits
//     whose CD field is the flit index 0..3, each popped from the FIFO. A data
//     flit is offered only when the FIFO has a word, so the packet IP sees a
//     stall instead of a gap.
// The header and address flits of the response may leave before the AXI data
// arrives; the data flits wait for it (address precedes its data).
// Accepted request flits with wrong check bits raise ecc_err for one cycle.
// Timing: selects and valids are combinational from the state; transfers
// happen when valid and ready are both high. Reset: asynchronous, active low.
// The control-unit structure follows the translator architecture; the
// state split, the echoing of SID and H and the sequencing rules are this
// design's choices.
module pkt2axi_ctrl
  import pkt_pkg::*;
#(
  parameter int unsigned PATH_BEATS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // packet requests (from the packet IP)
  input  logic              rx_valid,
  input  flit_t             rx_flit,
  output logic              rx_ready,
  // address calculator
  output logic              calc_load,
  output logic [11:0]       calc_offset,
  // AXI read address channel
  output logic              arvalid,
  input  logic              arready,
  output logic [7:0]        arlen,
  // AXI read data channel and read-data FIFO
  input  logic              rvalid,
  output logic              rready,
  input  logic              rf_full,
  input  logic              rf_empty,
  output logic              rf_push,
  output logic              rf_pop,
  // packet responses (to the packet IP)
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [1:0]        tx_sel,    // 0 header, 1 address, 2 data
  output logic [TID_W-1:0]  tx_tid,
  output logic [SID_W-1:0]  tx_sid,
  output logic              tx_h,
  output logic [CD_W-1:0]   tx_cd,
  // status
  output logic              ecc_err
);

  localparam int unsigned NBURST = PKT_WORDS / PATH_BEATS;

  typedef enum logic [1:0] {RX_HDR, RX_ADDR, RX_SKIP, RX_BUSY} rx_state_e;
  typedef enum logic [1:0] {AR_IDLE, AR_ISSUE}                 ar_state_e;
  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_ADDR, TX_DATA} tx_state_e;

  rx_state_e  rx_state;
  ar_state_e  ar_state;
  tx_state_e  tx_state;
  logic [5:0] rx_left;
  logic [2:0] ar_cnt;
  logic [2:0] tx_cnt;
  logic       rx_fire, tx_fire, start, done;
  hdr_flit_t  rx_hdr;
  addr_flit_t rx_addr;

  assign rx_hdr  = hdr_flit_t'(rx_flit);
  assign rx_addr = addr_flit_t'(rx_flit);
  assign rx_fire = rx_valid && rx_ready;
  assign tx_fire = tx_valid && tx_ready;
  assign start   = rx_fire && (rx_state == RX_ADDR);
  assign done    = tx_fire && (tx_state == TX_DATA) && (tx_cnt == 3'(PKT_WORDS - 1));

  // ---------------- request state machine ----------------
  assign rx_ready  = (rx_state != RX_BUSY);
  assign calc_load = start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state <= RX_HDR;
      rx_left  <= '0;
      tx_tid   <= '0;
      tx_sid   <= '0;
      tx_h     <= 1'b0;
    end else begin
      unique case (rx_state)
        RX_HDR: if (rx_fire) begin
          if (rx_hdr.cmd == CMD_RDREQ16) begin
            rx_state <= RX_ADDR;
            tx_tid   <= rx_hdr.tid;
          end else if (rx_hdr.len > 6'd1) begin
            rx_left  <= rx_hdr.len - 6'd1;
            rx_state <= RX_SKIP;
          end
        end
        RX_ADDR: if (rx_fire) begin
          tx_sid   <= rx_addr.sid;
          tx_h     <= rx_addr.h;
          rx_state <= RX_BUSY;
        end
        RX_SKIP: if (rx_fire) begin
          rx_left <= rx_left - 1'b1;
          if (rx_left == 6'd1) rx_state <= RX_HDR;
        end
        RX_BUSY: if (done) rx_state <= RX_HDR;
        default: rx_state <= RX_HDR;
      endcase
    end
  end

  always_comb begin
    ecc_err = 1'b0;
    if (rx_fire) begin
      unique case (rx_state)
        RX_HDR:  ecc_err = !hdr_ok(rx_flit);
        RX_ADDR: ecc_err = !addr_ok(rx_flit);
        default: ecc_err = 1'b0;
      endcase
    end
  end

  // ---------------- AXI read state machine ----------------
  assign arvalid     = (ar_state == AR_ISSUE);
  assign arlen       = 8'(PATH_BEATS - 1);
  assign calc_offset = 12'(ar_cnt) * 12'(4 * PATH_BEATS);
  assign rready      = !rf_full;
  assign rf_push     = rvalid && rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_state <= AR_IDLE;
      ar_cnt   <= '0;
    end else begin
      unique case (ar_state)
        AR_IDLE: if (start) begin
          ar_state <= AR_ISSUE;
          ar_cnt   <= '0;
        end
        AR_ISSUE: if (arready) begin
          if (ar_cnt == 3'(NBURST - 1)) ar_state <= AR_IDLE;
          else ar_cnt <= ar_cnt + 1'b1;
        end
        default: ar_state <= AR_IDLE;
      endcase
    end
  end

  // ---------------- response state machine ----------------
  always_comb begin
    tx_valid = 1'b0;
    tx_sel   = 2'd0;
    unique case (tx_state)
      TX_HDR:  begin tx_valid = 1'b1;      tx_sel = 2'd0; end
      TX_ADDR: begin tx_valid = 1'b1;      tx_sel = 2'd1; end
      TX_DATA: begin tx_valid = !rf_empty; tx_sel = 2'd2; end
      default: begin tx_valid = 1'b0;      tx_sel = 2'd0; end
    endcase
  end
  assign tx_cd  = tx_cnt;
  assign rf_pop = tx_fire && (tx_state == TX_DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE;
      tx_cnt   <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE: if (start) tx_state <= TX_HDR;
        TX_HDR:  if (tx_fire) tx_state <= TX_ADDR;
        TX_ADDR: if (tx_fire) begin
          tx_state <= TX_DATA;
          tx_cnt   <= '0;
        end
        TX_DATA: if (tx_fire) begin
          if (done) tx_state <= TX_IDLE;
          else      tx_cnt   <= tx_cnt + 1'b1;
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  initial begin
    assert (PATH_BEATS == 1 || PATH_BEATS == 2 || PATH_BEATS == 4)
      else $error("pkt2axi_ctrl: PATH_BEATS must be 1, 2 or 4");
  end

  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              arvalid && !arready |=> arvalid && $stable(calc_offset))
    else $error("pkt2axi_ctrl: AR request withdrawn before it was taken");

endmodule
