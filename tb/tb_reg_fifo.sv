// tb_reg_fifo: self-checking test of the register FIFO.
//
// Drives random pushes and pops (never a push into a full or a pop from an
// empty FIFO, which the FIFO's assertions forbid) against a queue model, in
// two copies: depth 4 (the translators' read-data FIFO) and depth 1 (the AR
// FIFO). Checks every popped word, full, empty and count each cycle, and a
// push and pop in the same cycle on a full FIFO.
module tb_reg_fifo;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        push4, pop4, full4, empty4;
  logic [31:0] din4, dout4;
  logic [2:0]  count4;
  logic        push1, pop1, full1, empty1;
  logic [31:0] din1, dout1;
  logic [0:0]  count1;

  reg_fifo #(.WIDTH(32), .DEPTH(4)) dut4 (.clk, .rst_n, .push(push4), .din(din4), .pop(pop4),
                                          .dout(dout4), .full(full4), .empty(empty4), .count(count4));
  reg_fifo #(.WIDTH(32), .DEPTH(1)) dut1 (.clk, .rst_n, .push(push1), .din(din1), .pop(pop1),
                                          .dout(dout1), .full(full1), .empty(empty1), .count(count1));

  logic [31:0] m4[$], m1[$];
  int both_full = 0;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      push4 <= 1'b0; pop4 <= 1'b0; din4 <= '0;
      push1 <= 1'b0; pop1 <= 1'b0; din1 <= '0;
    end else begin
      logic p, q;
      // model and checks of the values seen this cycle
      check(count4 == 3'(m4.size()) && full4 == (m4.size() == 4) && empty4 == (m4.size() == 0), "depth-4 flags");
      check(count1 == 1'(m1.size()) && full1 == (m1.size() == 1) && empty1 == (m1.size() == 0), "depth-1 flags");
      if (pop4) begin
        check(dout4 == m4[0], $sformatf("depth-4 data %h expected %h", dout4, m4[0]));
        void'(m4.pop_front());
      end
      if (push4) m4.push_back(din4);
      if (pop1) begin
        check(dout1 == m1[0], "depth-1 data");
        void'(m1.pop_front());
      end
      if (push1) m1.push_back(din1);
      if (push4 && pop4 && m4.size() == 4) both_full++;
      // next stimulus, from the model state after this edge
      q = (m4.size() > 0) && ($urandom_range(0, 2) != 0);
      p = (m4.size() < 4 || q) && ($urandom_range(0, 2) != 0);
      pop4 <= q; push4 <= p; din4 <= $urandom;
      q = (m1.size() > 0) && ($urandom_range(0, 1) != 0);
      p = (m1.size() < 1 || q) && ($urandom_range(0, 1) != 0);
      pop1 <= q; push1 <= p; din1 <= $urandom;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    check(both_full > 0, "push and pop on a full FIFO exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
