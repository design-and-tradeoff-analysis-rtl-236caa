`timescale 1ps/1ps
// switch_counter: counts the cycles of the generated clock spent at the
// current frequency.
//
// How it works: an m-bit up-counter (m from Eq. (2), m = ceil(log2(f_o/f_sw)))
// advances on every rising edge of its clock, which in the MFC circuit is the
// carry-chain output. When clear is high at an edge the counter returns to
// zero instead, which starts the count for the next frequency.
//
// Interface: clk, rst_n (asynchronous, active low: the ring produces no
// edges while stopped, so a synchronous reset could not act), clear,
// count[CNT_W-1:0].
// Timing: count is valid one clock-to-output delay after each rising edge.
// The source names the counter and its width rule; the clear input and the
// reset style are this design's choices.
module switch_counter #(
  parameter int unsigned CNT_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else            count <= count + 1'b1;
  end

endmodule
