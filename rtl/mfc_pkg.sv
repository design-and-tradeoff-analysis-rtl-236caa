`timescale 1ps/1ps
// mfc_pkg: constants and helper functions shared by the multi-frequency
// clocking (MFC) circuit.
//
// The MFC circuit is a ring oscillator whose loop contains a variable delay
// line built from CARRY4 carry-chain blocks. Each CARRY4 holds four carry
// multiplexers (MUXCY), so a chain of N_CARRY4 blocks offers 4*N_CARRY4
// selectable loop delays, i.e. 4*N_CARRY4 clock frequencies.
//
// The select word (SIN) of the chain is a thermometer code: SIN[p:0] all ones
// makes the data input enter the chain at multiplexer p and ripple through the
// multiplexers above it. Frequency index i (0 = fastest) therefore uses
// SIN = all_ones >> i, which routes the loop through i+1 multiplexers. The
// four-bit patterns 1111 / 0111 / 0011 / 0001 for one, two, three and four
// multiplexer delays follow the source description; extending them to the
// whole chain by a right shift is this design's reading.
//
// Default delays (picoseconds) reproduce the published figures: 50 ps per
// MUXCY and a base clock cycle time of 31.84 ns (31.4 MHz). The split of the
// remaining loop delay between the AND gate, the inverter chain and the
// global clock buffer is this design's choice.
package mfc_pkg;

  // Chain geometry (main configuration: eight CARRY4 blocks, 32 frequencies).
  localparam int unsigned MUX_PER_CARRY4 = 4;
  localparam int unsigned N_CARRY4_DEF   = 8;

  // Timing of the loop elements in ps, used by simulation only.
  localparam int unsigned D_MUXCY_PS_DEF   = 50;    // per-MUXCY delay
  localparam int unsigned T_AND_PS_DEF     = 150;   // enable AND gate
  localparam int unsigned N_INV_DEF        = 3;     // inverters in the chain (odd)
  localparam int unsigned T_INV_PS_DEF     = 4740;  // per inverter stage
  localparam int unsigned T_BUFG_PS_DEF    = 1500;  // global clock buffer
  localparam int unsigned BCCT_PS          = 31840; // base clock cycle time

  // Counter sizing, Eq. (2): m = ceil(log2(f_o / f_sw)).
  localparam int unsigned F_O_KHZ_DEF  = 31400;  // operating frequency
  localparam int unsigned F_SW_KHZ_DEF = 100;    // switching frequency (assumed)

  // Counter width from Eq. (2); at least one bit.
  function automatic int unsigned counter_width(int unsigned f_o_khz,
                                                int unsigned f_sw_khz);
    int unsigned ratio;
    ratio = (f_o_khz + f_sw_khz - 1) / f_sw_khz;
    return (ratio <= 2) ? 1 : $clog2(ratio);
  endfunction

  // Thermometer select code for frequency index idx on a chain of width
  // sin_w: the lowest (sin_w - idx) bits are ones.
  function automatic logic [63:0] sin_code(int unsigned idx, int unsigned sin_w);
    logic [63:0] ones;
    ones = (sin_w >= 64) ? '1 : ((64'd1 << sin_w) - 64'd1);
    return ones >> idx;
  endfunction

endpackage
