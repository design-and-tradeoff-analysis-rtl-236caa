`timescale 1ps/1ps
// mfc: multi-frequency clocking circuit. A ring oscillator whose loop delay
// is stepped through 4*N_CARRY4 values by a carry-chain delay line, so the
// generated clock hops among that many nearby frequencies and spreads its
// spectral energy (lower peak electromagnetic emission than a single clock).
//
// Loop: data_in -> carry4_chain (delay set by SIN) -> cout -> enable_gate
// (AND with en) -> inverter_chain (odd count, inverting) -> clk -> global
// clock buffer (outside this module) -> data_in. The loop inverts, so the
// clock period is twice the loop delay:
//   CCT_i = BCCT + i * 2 * D_MUXCY,  i = 0 .. 4*N_CARRY4-1      (Eq. 1)
// With the defaults (50 ps multiplexer, 31.84 ns base) the 32 periods run
// from 31.84 ns to 34.94 ns in 100 ps steps.
//
// Control: switch_counter counts rising edges of the carry-chain output;
// freq_comparator compares the count with sw_threshold and, after that many
// cycles, steps the frequency index freq_sel (0 = fastest, ascending,
// wrapping). sin_mux turns the index into the thermometer select word for
// the chain. The new select is applied right after a rising edge of cout and
// must settle before the following edge reaches data_in, i.e.
//   T_counter + T_comp + T_MUX < T_AND + T_inverter-chain + T_BUFG  (Eq. 3).
//
// Interface: en starts (1) and stops (0) the ring; rst_n is an asynchronous,
// active-low reset of the counter and index; sw_threshold is the number of
// cycles spent at each frequency; clk is the generated clock, to be sent to
// the global clock buffer, whose output must come back on data_in (the
// buffer is a vendor clock-tree resource and is not part of this module).
// freq_sel and sin show the current frequency index and select word.
//
// Source versus choices: the loop structure, the carry chain with 4 steps per
// block, the counter/comparator/multiplexer control and Eqs. (1)-(3) follow
// the source. The ascending hopping order, the threshold semantics, the
// asynchronous reset, the counter clock (cout), the default switching
// frequency (100 kHz, giving a 9-bit counter by Eq. 2) and the split of the
// loop delay among the gate, inverters and buffer are this design's choices.
// All delays act in simulation only; on an FPGA they come from placement.
module mfc
  import mfc_pkg::*;
#(
  parameter int unsigned N_CARRY4   = N_CARRY4_DEF,
  parameter int unsigned D_MUXCY_PS = D_MUXCY_PS_DEF,
  parameter int unsigned T_AND_PS   = T_AND_PS_DEF,
  parameter int unsigned N_INV      = N_INV_DEF,
  parameter int unsigned T_INV_PS   = T_INV_PS_DEF,
  parameter int unsigned F_O_KHZ    = F_O_KHZ_DEF,
  parameter int unsigned F_SW_KHZ   = F_SW_KHZ_DEF,
  parameter int unsigned CNT_W      = counter_width(F_O_KHZ, F_SW_KHZ),
  localparam int unsigned N_FREQ    = MUX_PER_CARRY4 * N_CARRY4,
  localparam int unsigned SIN_W     = MUX_PER_CARRY4 * N_CARRY4,
  localparam int unsigned SEL_W     = (N_FREQ > 1) ? $clog2(N_FREQ) : 1
) (
  input  logic             en,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] sw_threshold,
  input  logic             data_in,
  output logic             clk,
  output logic             cout,
  output logic [SEL_W-1:0] freq_sel,
  output logic [SIN_W-1:0] sin
);

  // ---------------- control: counter, comparator, SIN multiplexer ----------
  logic [CNT_W-1:0] count;
  logic             switch_now;
  logic [SIN_W-1:0] sin_codes [N_FREQ];

  for (genvar i = 0; i < N_FREQ; i++) begin : g_code
    assign sin_codes[i] = SIN_W'(sin_code(i, SIN_W));
  end

  switch_counter #(.CNT_W(CNT_W)) u_counter (
    .clk   (cout),
    .rst_n (rst_n),
    .clear (switch_now),
    .count (count)
  );

  freq_comparator #(.CNT_W(CNT_W), .N_FREQ(N_FREQ)) u_comparator (
    .clk        (cout),
    .rst_n      (rst_n),
    .count      (count),
    .threshold  (sw_threshold),
    .switch_now (switch_now),
    .sel        (freq_sel)
  );

  sin_mux #(.N_IN(N_FREQ), .W(SIN_W)) u_mux (
    .codes (sin_codes),
    .sel   (freq_sel),
    .y     (sin)
  );

  // ---------------- ring: delay line, enable gate, inverter chain ----------
  logic gated;

  carry4_chain #(.N_CARRY4(N_CARRY4), .D_MUXCY_PS(D_MUXCY_PS)) u_chain (
    .din  (data_in),
    .sin  (sin),
    .cout (cout)
  );

  enable_gate #(.T_AND_PS(T_AND_PS)) u_and (
    .en (en),
    .a  (cout),
    .y  (gated)
  );

  inverter_chain #(.N_INV(N_INV), .T_INV_PS(T_INV_PS)) u_inv (
    .a (gated),
    .y (clk)
  );

endmodule
