// tb_addr_calc: self-checking test of the address calculator: loads random
// base addresses, holds them while load is low, and checks base and
// base + offset (modulo 2^32) for random offsets, including wrap-around.
module tb_addr_calc;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        load;
  logic [31:0] base_in, base, addr;
  logic [11:0] offset;
  logic [31:0] model;

  addr_calc #(.ADDR_W(32), .OFF_W(12)) dut (.clk, .rst_n, .load, .base_in, .offset, .base, .addr);

  initial begin
    load = 1'b0; base_in = '0; offset = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      load    = ($urandom_range(0, 2) == 0);
      base_in = (t % 50 == 1) ? 32'hFFFF_FFF0 : $urandom;
      @(posedge clk);
      if (load) model = base_in;
      @(negedge clk);
      load = 1'b0;
      for (int k = 0; k < 4; k++) begin
        offset = 12'($urandom);
        #1;
        checks += 2;
        if (base != model || addr != model + 32'(offset)) begin
          failures++;
          $display("FAIL: base %h addr %h expected %h + %h", base, addr, model, offset);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
