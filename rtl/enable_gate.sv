`timescale 1ps/1ps
// enable_gate: the two-input AND gate that opens and closes the MFC ring.
//
// How it works: y = en & a. While en is 0 the output is held at 0, the
// inverter chain then holds the clock at 1 and the ring stops; when en rises
// the ring starts oscillating. Gating the ring with an enable follows the
// source's drawing; the 150 ps delay is this design's choice.
//
// Interface: en (enable), a (carry-chain output), y (to the inverter chain).
// Timing: combinational, T_AND_PS in simulation only.
module enable_gate #(
  parameter int unsigned T_AND_PS = mfc_pkg::T_AND_PS_DEF
) (
  input  logic en,
  input  logic a,
  output logic y
);

  assign #(T_AND_PS) y = en & a;

endmodule
