`timescale 1ps/1ps
// carry4: one carry-chain block, four carry multiplexers (MUXCY) and four
// carry XOR gates (XORCY), used here as a four-step variable delay element.
//
// How it works: multiplexer k passes the shared data input din when its
// select sin[k] is 1 and the carry from the stage below when sin[k] is 0
// (stage 0 takes cin). The block's carry output cout is the output of the
// top multiplexer. With a thermometer select the data input enters at the
// highest set select bit and ripples upward, so
//   sin = 1111 -> 1 multiplexer delay, 0111 -> 2, 0011 -> 3, 0001 -> 4,
// as in the source description. Each XORCY gives o[k] = sin[k] ^ carry into
// stage k, as in the vendor primitive; the delay line leaves these unused.
//
// Interface: cin (carry in from the block below), din (data in, one bit fed
// to all four multiplexers), sin[3:0] (selects); co[3:0] (carry after each
// stage), cout (= co[3]), o[3:0] (XOR outputs).
//
// Timing: purely combinational. D_MUXCY_PS is the delay of one multiplexer,
// applied in simulation only (synthesis ignores it); 50 ps is the published
// average. The single shared din and the XOR delay of zero are this design's
// reading of the source; the vendor primitive has a four-bit data input.
module carry4 #(
  parameter int unsigned D_MUXCY_PS = mfc_pkg::D_MUXCY_PS_DEF
) (
  input  logic       cin,
  input  logic       din,
  input  logic [3:0] sin,
  output logic [3:0] co,
  output logic       cout,
  output logic [3:0] o
);

  // Carry after each stage. MUXCY_k: input "1" is din, input "0" is the
  // carry from the stage below (cin for stage 0).
  logic c0, c1, c2, c3;
  assign #(D_MUXCY_PS) c0 = sin[0] ? din : cin;
  assign #(D_MUXCY_PS) c1 = sin[1] ? din : c0;
  assign #(D_MUXCY_PS) c2 = sin[2] ? din : c1;
  assign #(D_MUXCY_PS) c3 = sin[3] ? din : c2;
  assign co = {c3, c2, c1, c0};

  // XORCY_k: select bit xor the carry into stage k.
  assign o = sin ^ {c2, c1, c0, cin};

  assign cout = c3;

endmodule
