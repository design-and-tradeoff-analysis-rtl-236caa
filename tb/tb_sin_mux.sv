`timescale 1ps/1ps
// tb_sin_mux: loads 32 random 32-bit words into the multiplexer inputs and
// checks that every select value returns its word.
module tb_sin_mux;
  logic [31:0] codes [32];
  logic [4:0]  sel;
  logic [31:0] y;
  int checks = 0, failures = 0;

  sin_mux #(.N_IN(32), .W(32)) dut (.codes, .sel, .y);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      foreach (codes[k]) codes[k] = $urandom();
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #100;
        checks++;
        if (y !== codes[s]) begin
          failures++;
          $display("FAIL: sel=%0d y=%h exp=%h", s, y, codes[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
