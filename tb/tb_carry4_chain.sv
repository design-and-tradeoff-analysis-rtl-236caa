`timescale 1ps/1ps
// tb_carry4_chain: self-checking test of the eight-block delay line.
// 1) Delay: for every frequency index i (0..31) with thermometer select
//    all_ones >> i, rising and falling din edges must reach cout after
//    exactly (i+1) * 50 ps.
// 2) Function: for random selects, din enters at the highest set select bit
//    so cout follows din; with an all-zero select cout is the tied-off 0.
module tb_carry4_chain;
  localparam int unsigned N = 8;
  localparam int unsigned W = 4 * N;
  localparam int unsigned D = 50;

  logic         din;
  logic [W-1:0] sin;
  logic         cout;
  int checks = 0, failures = 0;

  carry4_chain #(.N_CARRY4(N), .D_MUXCY_PS(D)) dut (.din, .sin, .cout);

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    realtime t0;
    logic    exp;

    // ---- delay per frequency index
    for (int i = 0; i < W; i++) begin
      sin = {W{1'b1}} >> i;
      din = 0;
      #5000;
      check(cout == 0, $sformatf("i=%0d cout not low", i));
      din = 1; t0 = $realtime;
      @(posedge cout);
      check($realtime - t0 == (i + 1) * D,
            $sformatf("i=%0d rise delay %0t expected %0d", i, $realtime - t0, (i + 1) * D));
      #5000;
      din = 0; t0 = $realtime;
      @(negedge cout);
      check($realtime - t0 == (i + 1) * D,
            $sformatf("i=%0d fall delay %0t expected %0d", i, $realtime - t0, (i + 1) * D));
    end

    // ---- function with random selects
    for (int r = 0; r < 200; r++) begin
      sin = W'($urandom());
      if (r % 7 == 0) sin = '0;
      din = 1'($urandom());
      #5000;
      exp = (sin != 0) ? din : 1'b0;
      check(cout == exp, $sformatf("sin=%h din=%b cout=%b", sin, din, cout));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
