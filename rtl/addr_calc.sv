// addr_calc: address calculator of a translator.
//
// When one side reads in pieces of a different size than the other (an AXI
// burst split into 16-byte packets, or a 16-byte packet split into shorter
// bursts), every piece needs its own address: the address of the whole
// sequence plus the byte offset of the piece. The control unit loads the base
// address once per transaction sequence (load) and then supplies, per state,
// the offset of the current edge from the start of the sequence; addr is the
// sum, available in the same cycle. The base register is cleared by the
// asynchronous active-low reset. The load/offset interface is this design's
// choice; the base-plus-offset function is the translator architecture's.
module addr_calc #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned OFF_W  = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] base_in,
  input  logic [OFF_W-1:0]  offset,
  output logic [ADDR_W-1:0] base,
  output logic [ADDR_W-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    base <= '0;
    else if (load) base <= base_in;
  end

  assign addr = base + ADDR_W'(offset);

endmodule
