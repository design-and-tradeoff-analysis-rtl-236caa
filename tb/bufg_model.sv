`timescale 1ps/1ps
// bufg_model: simulation model of a global clock buffer, used by the
// testbenches to close the MFC ring. It forwards its input to its output
// after T_BUFG_PS (1500 ps by default, a value chosen so that the ring's
// base cycle time is 31.84 ns). Not synthesizable logic: a vendor
// clock-tree primitive takes its place on an FPGA.
module bufg_model #(
  parameter int unsigned T_BUFG_PS = 1500
) (
  input  logic i,
  output logic o
);
  assign #(T_BUFG_PS) o = i;
endmodule
