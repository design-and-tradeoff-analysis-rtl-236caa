`timescale 1ps/1ps
// inverter_chain: an odd number of inverters in series that closes the MFC
// ring oscillator and sets most of its base clock cycle time.
//
// How it works: N_INV inverters are cascaded; with N_INV odd the output is
// the complement of the input, delayed by N_INV * T_INV_PS. The odd count
// makes the loop (AND gate, inverter chain, clock buffer, carry chain)
// inverting, so it oscillates with a half period equal to the loop delay.
// Three stages follow the source's drawing. The per-stage delay of 4740 ps
// is this design's choice, made so that the whole loop gives the published
// 31.84 ns base cycle time; on an FPGA the stages would be lookup tables
// kept from being merged.
//
// Interface: a (input), y (output, ~a after the chain delay).
// Timing: combinational, delays apply in simulation only.
module inverter_chain #(
  parameter int unsigned N_INV    = mfc_pkg::N_INV_DEF,
  parameter int unsigned T_INV_PS = mfc_pkg::T_INV_PS_DEF
) (
  input  logic a,
  output logic y
);

  logic [N_INV:0] node;
  assign node[0] = a;

  for (genvar k = 0; k < N_INV; k++) begin : g_inv
    assign #(T_INV_PS) node[k+1] = ~node[k];
  end

  assign y = node[N_INV];

  // The loop only oscillates with an odd number of inversions.
  initial assert (N_INV % 2 == 1)
    else $error("inverter_chain: N_INV must be odd, got %0d", N_INV);

endmodule
