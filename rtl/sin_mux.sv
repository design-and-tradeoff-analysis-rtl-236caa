`timescale 1ps/1ps
// sin_mux: the wide multiplexer that picks the carry-chain select word SIN.
//
// How it works: N_IN candidate words of width W arrive on codes[]; sel
// chooses one and drives it to y. In the MFC circuit there are 32 candidates
// of 32 bits, one thermometer code per clock frequency, as in the source's
// drawing. An out-of-range sel gives the all-ones word (fastest frequency),
// this design's choice.
//
// Interface: codes[N_IN] (W bits each), sel, y[W-1:0].
// Timing: combinational.
module sin_mux #(
  parameter int unsigned N_IN  = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned SEL_W = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic [W-1:0]     codes [N_IN],
  input  logic [SEL_W-1:0] sel,
  output logic [W-1:0]     y
);

  always_comb begin
    y = '1;
    for (int unsigned k = 0; k < N_IN; k++) begin
      if (sel == SEL_W'(k)) y = codes[k];
    end
  end

endmodule
