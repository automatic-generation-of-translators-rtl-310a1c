// flit_mux: multiplexer that routes one of N data sources onto a shared
// destination (an outgoing flit, or the input of a FIFO).
//
// In a translator several sources often share one destination: the header,
// address and data flits of a packet all leave on the same wires. The control
// unit sets the select from its current state. This is a purely combinational
// N-to-1 selector; a select beyond N-1 gives zero. Widths and the
// out-of-range behaviour are this design's choices.
module flit_mux #(
  parameter int unsigned WIDTH = 40,
  parameter int unsigned N     = 3
) (
  input  logic [N-1:0][WIDTH-1:0]             din,
  input  logic [((N > 1) ? $clog2(N) : 1)-1:0] sel,
  output logic [WIDTH-1:0]                    dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      if (32'(sel) == i) dout = din[i];
    end
  end

endmodule
