`timescale 1ps/1ps
// tb_freq_comparator: runs the comparator together with a reference cycle
// counter (built in the testbench) for several switching thresholds and
// checks switch_now and the frequency index every cycle: each index must be
// held for max(threshold,1) cycles and the index must wrap from 31 to 0.
module tb_freq_comparator;
  localparam int unsigned W = 9;
  localparam int unsigned NF = 32;
  logic         clk = 0, rst_n;
  logic [W-1:0] count, threshold;
  logic         switch_now;
  logic [4:0]   sel;
  int checks = 0, failures = 0, wraps = 0;

  freq_comparator #(.CNT_W(W), .N_FREQ(NF)) dut (.clk, .rst_n, .count, .threshold,
                                                .switch_now, .sel);

  // testbench-side counter feeding the comparator
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          count <= '0;
    else if (switch_now) count <= '0;
    else                 count <= count + 1'b1;

  always #16000 clk = ~clk;

  initial begin : watchdog
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    static int unsigned thr_list[5] = '{0, 1, 3, 7, 300};
    int unsigned ref_sel, held, hold;
    foreach (thr_list[t]) begin
      rst_n = 1; threshold = W'(thr_list[t]);
      #100 rst_n = 0;
      #5000;
      check(sel == 0, "sel not zero in reset");
      @(negedge clk); rst_n = 1;
      hold = (thr_list[t] == 0) ? 1 : thr_list[t];
      ref_sel = 0; held = 0;
      for (int c = 0; c < 2 * NF * hold + 5; c++) begin
        check(switch_now == (held + 1 == hold),
              $sformatf("thr=%0d cycle %0d switch_now=%b", thr_list[t], c, switch_now));
        @(posedge clk); #1;
        held++;
        if (held == hold) begin
          held = 0;
          if (ref_sel == NF - 1) wraps++;
          ref_sel = (ref_sel + 1) % NF;
        end
        check(sel == 5'(ref_sel),
              $sformatf("thr=%0d cycle %0d sel=%0d ref=%0d", thr_list[t], c, sel, ref_sel));
        @(negedge clk);
      end
    end
    check(wraps >= 5, "index never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
