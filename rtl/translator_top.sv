// translator_top: the two AXI/packet read translators side by side.
//
// a2p_*: AXI to packet. An AXI read master on one side, a slave IP speaking
//        the generic packet protocol on the other (axi2pkt_translator).
// p2a_*: packet to AXI. A master IP speaking the packet protocol on one side,
//        an AXI read slave on the other (pkt2axi_translator).
// The two share only the clock and the asynchronous active-low reset; each
// keeps its own ports and its own timing, described in its module. Together
// they are the pair of translators between AXI and the packet protocol, one
// per direction of the master/slave relation. Parameters pass through with
// their defaults: 16-byte packets, four-word FIFOs and the single-burst
// (lowest-latency) path for the packet-to-AXI direction.
module translator_top
  import pkt_pkg::*;
#(
  parameter int unsigned      A2P_RFIFO_DEPTH = 4,
  parameter logic [SID_W-1:0] A2P_SRC_ID      = 4'd0,
  parameter int unsigned      P2A_PATH_BEATS  = 4,
  parameter int unsigned      P2A_RFIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- AXI to packet ----
  input  logic [ADDR_W-1:0] a2p_araddr,
  input  logic [7:0]        a2p_arlen,
  input  logic              a2p_arvalid,
  output logic              a2p_arready,
  output logic [DATA_W-1:0] a2p_rdata,
  output logic              a2p_rvalid,
  output logic              a2p_rlast,
  input  logic              a2p_rready,
  output flit_t             a2p_tx_flit,
  output logic              a2p_tx_valid,
  input  logic              a2p_tx_ready,
  input  flit_t             a2p_rx_flit,
  input  logic              a2p_rx_valid,
  output logic              a2p_rx_ready,
  output logic              a2p_ecc_err,
  // ---- packet to AXI ----
  input  flit_t             p2a_rx_flit,
  input  logic              p2a_rx_valid,
  output logic              p2a_rx_ready,
  output flit_t             p2a_tx_flit,
  output logic              p2a_tx_valid,
  input  logic              p2a_tx_ready,
  output logic [ADDR_W-1:0] p2a_araddr,
  output logic [7:0]        p2a_arlen,
  output logic              p2a_arvalid,
  input  logic              p2a_arready,
  input  logic [DATA_W-1:0] p2a_rdata,
  input  logic              p2a_rvalid,
  output logic              p2a_rready,
  output logic              p2a_ecc_err
);

  axi2pkt_translator #(.RFIFO_DEPTH(A2P_RFIFO_DEPTH), .SRC_ID(A2P_SRC_ID)) u_axi2pkt (
    .clk, .rst_n,
    .araddr  (a2p_araddr),
    .arlen   (a2p_arlen),
    .arvalid (a2p_arvalid),
    .arready (a2p_arready),
    .rdata   (a2p_rdata),
    .rvalid  (a2p_rvalid),
    .rlast   (a2p_rlast),
    .rready  (a2p_rready),
    .tx_flit (a2p_tx_flit),
    .tx_valid(a2p_tx_valid),
    .tx_ready(a2p_tx_ready),
    .rx_flit (a2p_rx_flit),
    .rx_valid(a2p_rx_valid),
    .rx_ready(a2p_rx_ready),
    .ecc_err (a2p_ecc_err)
  );

  pkt2axi_translator #(.PATH_BEATS(P2A_PATH_BEATS), .RFIFO_DEPTH(P2A_RFIFO_DEPTH)) u_pkt2axi (
    .clk, .rst_n,
    .rx_flit (p2a_rx_flit),
    .rx_valid(p2a_rx_valid),
    .rx_ready(p2a_rx_ready),
    .tx_flit (p2a_tx_flit),
    .tx_valid(p2a_tx_valid),
    .tx_ready(p2a_tx_ready),
    .araddr  (p2a_araddr),
    .arlen   (p2a_arlen),
    .arvalid (p2a_arvalid),
    .arready (p2a_arready),
    .rdata   (p2a_rdata),
    .rvalid  (p2a_rvalid),
    .rready  (p2a_rready),
    .ecc_err (p2a_ecc_err)
  );

endmodule
