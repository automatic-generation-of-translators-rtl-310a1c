// axi2pkt_translator: translator between an AXI read master and a slave IP
// that speaks the generic packet protocol (AXI to packet).
//
// The AXI master issues a read burst on AR (araddr, arlen: arlen+1 words of
// 32 bits) and takes the words on R. The packet IP receives read requests
// (RdReq16: header + address flit) on the tx flit port and returns 16-byte
// read responses (RdResp16: header, address flit, four data flits) on the rx
// flit port; both flit ports use a valid/ready handshake.
// Structure: the AR request is buffered in a one-entry FIFO (one transaction
// sequence at a time), the address calculator forms base + 16*k for request
// packet k, a two-input multiplexer puts either the header flit or the address
// flit on the tx port, and the 32-bit data words of the responses pass through
// a register FIFO of RFIFO_DEPTH words to R. The control unit axi2pkt_ctrl
// drives all of them. The FIFO depth of four words (one RdResp16) is the most
// data buffered at one time; the rest of the structure follows the block
// diagram of this translator.
// Timing: arready is high only while no burst is in progress. The first
// request header leaves two cycles after the AR handshake; each read word
// appears on R one cycle after its data flit is accepted. rlast marks the last
// word. ecc_err pulses when an accepted response flit fails its check bits.
// The AXI subset is the one the protocol description uses plus rlast (no IDs,
// sizes or response codes); SRC_ID fills the SID field of requests.
module axi2pkt_translator
  import pkt_pkg::*;
#(
  parameter int unsigned     RFIFO_DEPTH = 4,
  parameter logic [SID_W-1:0] SRC_ID     = 4'd0
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI read address channel (from the AXI master)
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic              arvalid,
  output logic              arready,
  // AXI read data channel (to the AXI master)
  output logic [DATA_W-1:0] rdata,
  output logic              rvalid,
  output logic              rlast,
  input  logic              rready,
  // packet requests (to the packet IP)
  output flit_t             tx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  // packet responses (from the packet IP)
  input  flit_t             rx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  // status
  output logic              ecc_err
);

  // AR FIFO: {araddr, arlen} of the burst in progress
  logic               ar_full, ar_empty, ar_pop;
  logic [ADDR_W+7:0]  ar_head;
  logic [ADDR_W-1:0]  ar_addr_q;
  logic [7:0]         ar_len_q;

  reg_fifo #(.WIDTH(ADDR_W + 8), .DEPTH(1)) u_ar_fifo (
    .clk, .rst_n,
    .push (arvalid && arready),
    .din  ({araddr, arlen}),
    .pop  (ar_pop),
    .dout (ar_head),
    .full (ar_full),
    .empty(ar_empty),
    .count()
  );
  assign arready = !ar_full;
  assign {ar_addr_q, ar_len_q} = ar_head;

  // address calculator
  logic              calc_load;
  logic [11:0]       calc_offset;
  logic [ADDR_W-1:0] calc_addr;

  addr_calc #(.ADDR_W(ADDR_W), .OFF_W(12)) u_addr_calc (
    .clk, .rst_n,
    .load   (calc_load),
    .base_in(ar_addr_q),
    .offset (calc_offset),
    .base   (),
    .addr   (calc_addr)
  );

  // request flit multiplexer
  logic [0:0]            tx_sel;
  logic [TID_W-1:0]      tx_tid;
  logic [1:0][FLIT_W-1:0] tx_src;

  assign tx_src[0] = make_hdr(LEN_RDREQ16, CMD_RDREQ16, tx_tid);
  assign tx_src[1] = make_addr(SRC_ID, 1'b0, calc_addr);

  flit_mux #(.WIDTH(FLIT_W), .N(2)) u_tx_mux (
    .din (tx_src),
    .sel (tx_sel),
    .dout(tx_flit)
  );

  // read-data FIFO
  logic rf_push, rf_full, rf_empty;
  data_flit_t rx_data;
  assign rx_data = data_flit_t'(rx_flit);

  reg_fifo #(.WIDTH(DATA_W), .DEPTH(RFIFO_DEPTH)) u_rdata_fifo (
    .clk, .rst_n,
    .push (rf_push),
    .din  (rx_data.data),
    .pop  (rvalid && rready),
    .dout (rdata),
    .full (rf_full),
    .empty(rf_empty),
    .count()
  );
  assign rvalid = !rf_empty;

  axi2pkt_ctrl u_ctrl (
    .clk, .rst_n,
    .ar_empty   (ar_empty),
    .ar_len     (ar_len_q),
    .ar_pop     (ar_pop),
    .calc_load  (calc_load),
    .calc_offset(calc_offset),
    .tx_valid   (tx_valid),
    .tx_ready   (tx_ready),
    .tx_sel     (tx_sel),
    .tx_tid     (tx_tid),
    .rx_valid   (rx_valid),
    .rx_flit    (rx_flit),
    .rx_ready   (rx_ready),
    .rf_full    (rf_full),
    .rf_push    (rf_push),
    .r_fire     (rvalid && rready),
    .r_last     (rlast),
    .ecc_err    (ecc_err)
  );

endmodule
