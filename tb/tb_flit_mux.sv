// tb_flit_mux: self-checking test of the multiplexer, with three 40-bit
// inputs (the packet-to-AXI response mux) and two (the request mux): every
// select with random data, including the out-of-range select 3, which must
// give zero.
module tb_flit_mux;

  int checks = 0, failures = 0;

  logic [2:0][39:0] din3;
  logic [1:0]       sel3;
  logic [39:0]      dout3;
  logic [1:0][39:0] din2;
  logic [0:0]       sel2;
  logic [39:0]      dout2;

  flit_mux #(.WIDTH(40), .N(3)) dut3 (.din(din3), .sel(sel3), .dout(dout3));
  flit_mux #(.WIDTH(40), .N(2)) dut2 (.din(din2), .sel(sel2), .dout(dout2));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 3; i++) din3[i] = {8'($urandom), $urandom};
      for (int i = 0; i < 2; i++) din2[i] = {8'($urandom), $urandom};
      sel3 = 2'(t % 4);
      sel2 = 1'(t % 2);
      #1;
      checks += 2;
      if (dout3 != ((t % 4 == 3) ? 40'd0 : din3[t % 4])) begin
        failures++;
        $display("FAIL: 3-input mux sel=%0d", sel3);
      end
      if (dout2 != din2[t % 2]) begin
        failures++;
        $display("FAIL: 2-input mux sel=%0d", sel2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
