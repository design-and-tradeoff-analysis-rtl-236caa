`timescale 1ps/1ps
// tb_enable_gate: truth table of the ring's enable AND gate and its
// 150 ps delay.
module tb_enable_gate;
  localparam int unsigned TD = 150;
  logic en, a, y;
  int checks = 0, failures = 0;

  enable_gate #(.T_AND_PS(TD)) dut (.en, .a, .y);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    realtime t0;
    for (int v = 0; v < 4; v++) begin
      {en, a} = 2'(v);
      #1000;
      check(y == (v == 3), $sformatf("en=%b a=%b y=%b", en, a, y));
    end
    en = 1; a = 0; #1000;
    a = 1; t0 = $realtime;
    @(posedge y);
    check($realtime - t0 == TD, $sformatf("delay %0t", $realtime - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
