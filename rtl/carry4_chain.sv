`timescale 1ps/1ps
// carry4_chain: the variable delay line of the MFC circuit, N_CARRY4 carry4
// blocks connected in series (block k's cout drives block k+1's cin).
//
// How it works: all blocks receive the same data input din (in the MFC it is
// the fed-back clock after the global clock buffer) and block k receives
// select bits sin[4k+3:4k]. The data input enters the chain at the highest
// select bit that is 1 and ripples through every multiplexer above it, so
// with thermometer code sin = all_ones >> i the delay from din to cout is
// (i+1) multiplexer delays, i = 0 .. 4*N_CARRY4-1. Thermometer codes also
// keep every multiplexer output equal to din while din is steady, so the
// select may change between edges without a glitch on cout.
//
// Interface: din, sin[4*N_CARRY4-1:0], cout. The carry input of the lowest
// block is tied to 0 (this design's choice): an all-zero select therefore
// stops the oscillator.
//
// The per-stage carries and XOR outputs of each block are left unconnected:
// only the top carry output belongs to the delay path.
//
// Timing: combinational; each multiplexer adds D_MUXCY_PS in simulation.
// The eight-block default is the source's main configuration.
module carry4_chain #(
  parameter int unsigned N_CARRY4   = mfc_pkg::N_CARRY4_DEF,
  parameter int unsigned D_MUXCY_PS = mfc_pkg::D_MUXCY_PS_DEF
) (
  input  logic                  din,
  input  logic [4*N_CARRY4-1:0] sin,
  output logic                  cout
);

  logic [N_CARRY4:0] carry;   // carry[k] enters block k
  assign carry[0] = 1'b0;

  for (genvar k = 0; k < N_CARRY4; k++) begin : g_blk
    logic [3:0] co_k;
    logic [3:0] o_k;
    carry4 #(.D_MUXCY_PS(D_MUXCY_PS)) u_carry4 (
      .cin  (carry[k]),
      .din  (din),
      .sin  (sin[4*k +: 4]),
      .co   (co_k),
      .cout (carry[k+1]),
      .o    (o_k)
    );
  end

  assign cout = carry[N_CARRY4];

endmodule
