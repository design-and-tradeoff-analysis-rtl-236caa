`timescale 1ps/1ps
// tb_switch_counter: drives the cycle counter with a free clock and random
// clear pulses, and compares it with a reference count every cycle,
// including wrap-around of the 9-bit count and asynchronous reset.
module tb_switch_counter;
  localparam int unsigned W = 9;
  logic         clk = 0, rst_n, clear;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;

  switch_counter #(.CNT_W(W)) dut (.clk, .rst_n, .clear, .count);

  always #16000 clk = ~clk;

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    rst_n = 1; clear = 0;
    #100 rst_n = 0;
    #5000;
    check(count == 0, "count not zero in reset");
    @(negedge clk); rst_n = 1;
    ref_cnt = 0;
    for (int c = 0; c < 1500; c++) begin
      clear = (c > 700) && ($urandom_range(0, 19) == 0);
      @(posedge clk); #1;
      ref_cnt = clear ? 0 : (ref_cnt + 1) % (1 << W);
      check(count == W'(ref_cnt), $sformatf("cycle %0d count=%0d ref=%0d", c, count, ref_cnt));
      @(negedge clk);
    end
    // asynchronous reset mid-cycle
    #3000 rst_n = 0; #1;
    check(count == 0, "async reset did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
