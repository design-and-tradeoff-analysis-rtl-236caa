`timescale 1ps/1ps
// tb_inverter_chain: checks that the three-stage chain inverts its input
// and that each edge takes 3 * 4740 ps to pass.
module tb_inverter_chain;
  localparam int unsigned N  = 3;
  localparam int unsigned TD = 4740;
  logic a, y;
  int checks = 0, failures = 0;

  inverter_chain #(.N_INV(N), .T_INV_PS(TD)) dut (.a, .y);

  initial begin : watchdog
    #10_000_000;
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
    a = 0;
    #50_000;
    check(y == 1, "y != ~a after settling (a=0)");
    for (int k = 0; k < 6; k++) begin
      a = ~a; t0 = $realtime;
      @(y);
      check($realtime - t0 == N * TD,
            $sformatf("edge %0d delay %0t expected %0d", k, $realtime - t0, N * TD));
      check(y == ~a, "y != ~a");
      #20_000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
