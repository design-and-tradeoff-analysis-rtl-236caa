`timescale 1ps/1ps
// tb_carry4: self-checking test of one carry4 block.
// 1) Function: for all 16 selects and all cin/din values the carry outputs
//    and XOR outputs are compared with a reference written from the
//    multiplexer rule (select 1 takes din, 0 takes the carry from below).
// 2) Delay: for the thermometer selects 1111, 0111, 0011, 0001 the time from
//    a din edge to the matching cout edge must be 1, 2, 3, 4 multiplexer
//    delays (50 ps each).
module tb_carry4;
  localparam int unsigned D = 50;

  logic       cin, din;
  logic [3:0] sin, co, o;
  logic       cout;
  int checks = 0, failures = 0;

  carry4 #(.D_MUXCY_PS(D)) dut (.cin, .din, .sin, .co, .cout, .o);

  initial begin : watchdog
    #10_000_000;
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
    logic       c;
    logic [3:0] exp_co, exp_o;
    realtime    t0;

    // ---- function, exhaustive
    for (int v = 0; v < 64; v++) begin
      {sin, cin, din} = 6'(v);
      #1000;
      c = cin;
      for (int k = 0; k < 4; k++) begin
        exp_o[k]  = sin[k] ^ c;
        c         = sin[k] ? din : c;
        exp_co[k] = c;
      end
      check(co == exp_co && o == exp_o && cout == exp_co[3],
            $sformatf("sin=%b cin=%b din=%b co=%b/%b o=%b/%b", sin, cin, din,
                      co, exp_co, o, exp_o));
    end

    // ---- delay for the thermometer patterns
    cin = 0;
    for (int n = 1; n <= 4; n++) begin
      sin = 4'b1111 >> (n - 1);
      din = 0;
      #1000;
      check(cout == 0, "cout low before edge");
      din = 1;
      t0  = $realtime;
      @(posedge cout);
      check($realtime - t0 == n * D,
            $sformatf("sin=%b delay %0t expected %0d ps", sin, $realtime - t0, n * D));
      #1000;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
