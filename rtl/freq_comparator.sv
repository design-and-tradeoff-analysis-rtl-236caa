`timescale 1ps/1ps
// freq_comparator: compares the cycle count with the switching threshold and
// steps the frequency selection that drives the SIN multiplexer.
//
// How it works: the current frequency has been used for count+1 cycles at
// each rising clock edge. When count+1 reaches the switching threshold,
// switch_now is raised (it also clears the counter) and the registered
// select sel moves to the next frequency index, wrapping from N_FREQ-1 back
// to 0. Each frequency is thus held for max(threshold,1) cycles. A
// threshold of 0 or 1 switches on every cycle; lowering the threshold below
// the running count switches at the next edge.
//
// Interface: clk, rst_n (asynchronous, active low), count, threshold;
// switch_now (combinational), sel (registered index, 0 = fastest).
// Timing: sel changes right after the edge at which switch_now is high, so
// the next clock period already uses the new frequency.
// The source gives the comparator and its role (threshold in cycles, then a
// new frequency); the ascending, wrapping order of frequencies and keeping
// the select register in this block are this design's choices.
module freq_comparator #(
  parameter int unsigned CNT_W  = 9,
  parameter int unsigned N_FREQ = 32,
  localparam int unsigned SEL_W = (N_FREQ > 1) ? $clog2(N_FREQ) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] count,
  input  logic [CNT_W-1:0] threshold,
  output logic             switch_now,
  output logic [SEL_W-1:0] sel
);

  logic [CNT_W:0] cycles_done;
  assign cycles_done = {1'b0, count} + 1'b1;
  assign switch_now  = (cycles_done >= {1'b0, threshold});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= '0;
    end else if (switch_now) begin
      if (sel == SEL_W'(N_FREQ - 1)) sel <= '0;
      else                           sel <= sel + 1'b1;
    end
  end

endmodule
