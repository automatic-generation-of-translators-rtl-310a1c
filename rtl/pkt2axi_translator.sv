// pkt2axi_translator: translator between a master IP that speaks the generic
// packet protocol and an AXI read slave (packet to AXI).
//
// The packet IP sends RdReq16 requests (header, address flit) on the rx flit
// port and receives RdResp16 responses (header, address flit, four data
// flits carrying 16 bytes) on the tx flit port, both with valid/ready. The
// translator reads the 16 bytes from the AXI slave with 4/PATH_BEATS bursts
// of PATH_BEATS 32-bit words; the default PATH_BEATS = 4 is one burst, the
// lowest-latency choice.
// Structure: the address calculator holds the request address and adds the
// byte offset of each burst; the AXI words go into a register FIFO of
// RFIFO_DEPTH words (four: the 16 bytes of one response are the most data
// buffered at one time); a three-input multiplexer selects the header flit,
// the address flit or the data flit built from the FIFO head for the tx port.
// The control unit pkt2axi_ctrl drives them all. This structure follows the
// translator architecture; the AXI subset (AR address and length, R data
// without IDs or response codes) and flit details are this design's choices.
// Timing: the AR request goes out the cycle after the address flit is taken,
// and so does the response header; each data flit can leave the cycle after
// its word arrived on R. One request is served at a time.
module pkt2axi_translator
  import pkt_pkg::*;
#(
  parameter int unsigned PATH_BEATS  = 4,
  parameter int unsigned RFIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // packet requests (from the packet IP)
  input  flit_t             rx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  // packet responses (to the packet IP)
  output flit_t             tx_flit,
  output logic              tx_valid,
  input  logic              tx_ready,
  // AXI read address channel (to the AXI slave)
  output logic [ADDR_W-1:0] araddr,
  output logic [7:0]        arlen,
  output logic              arvalid,
  input  logic              arready,
  // AXI read data channel (from the AXI slave)
  input  logic [DATA_W-1:0] rdata,
  input  logic              rvalid,
  output logic              rready,
  // status
  output logic              ecc_err
);

  addr_flit_t rx_addr;
  assign rx_addr = addr_flit_t'(rx_flit);

  // address calculator
  logic              calc_load;
  logic [11:0]       calc_offset;
  logic [ADDR_W-1:0] calc_base;

  addr_calc #(.ADDR_W(ADDR_W), .OFF_W(12)) u_addr_calc (
    .clk, .rst_n,
    .load   (calc_load),
    .base_in(rx_addr.addr),
    .offset (calc_offset),
    .base   (calc_base),
    .addr   (araddr)
  );

  // read-data FIFO
  logic              rf_push, rf_pop, rf_full, rf_empty;
  logic [DATA_W-1:0] rf_head;

  reg_fifo #(.WIDTH(DATA_W), .DEPTH(RFIFO_DEPTH)) u_rdata_fifo (
    .clk, .rst_n,
    .push (rf_push),
    .din  (rdata),
    .pop  (rf_pop),
    .dout (rf_head),
    .full (rf_full),
    .empty(rf_empty),
    .count()
  );

  // response flit multiplexer
  logic [1:0]             tx_sel;
  logic [TID_W-1:0]       tx_tid;
  logic [SID_W-1:0]       tx_sid;
  logic                   tx_h;
  logic [CD_W-1:0]        tx_cd;
  logic [2:0][FLIT_W-1:0] tx_src;

  assign tx_src[0] = make_hdr(LEN_RDRESP16, CMD_RDRESP16, tx_tid);
  assign tx_src[1] = make_addr(tx_sid, tx_h, calc_base);
  assign tx_src[2] = make_data(rf_head, tx_cd);

  flit_mux #(.WIDTH(FLIT_W), .N(3)) u_tx_mux (
    .din (tx_src),
    .sel (tx_sel),
    .dout(tx_flit)
  );

  pkt2axi_ctrl #(.PATH_BEATS(PATH_BEATS)) u_ctrl (
    .clk, .rst_n,
    .rx_valid   (rx_valid),
    .rx_flit    (rx_flit),
    .rx_ready   (rx_ready),
    .calc_load  (calc_load),
    .calc_offset(calc_offset),
    .arvalid    (arvalid),
    .arready    (arready),
    .arlen      (arlen),
    .rvalid     (rvalid),
    .rready     (rready),
    .rf_full    (rf_full),
    .rf_empty   (rf_empty),
    .rf_push    (rf_push),
    .rf_pop     (rf_pop),
    .tx_valid   (tx_valid),
    .tx_ready   (tx_ready),
    .tx_sel     (tx_sel),
    .tx_tid     (tx_tid),
    .tx_sid     (tx_sid),
    .tx_h       (tx_h),
    .tx_cd      (tx_cd),
    .ecc_err    (ecc_err)
  );

endmodule
