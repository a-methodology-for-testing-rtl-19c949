// tap_mux: the 16:1 multiplexer of the programmable delay line, with two
// outputs driven by one one-hot select.
//
// d_out follows the d_in bit picked by sel_oh and dd_out the dd_in bit picked
// by the same select. The delay line feeds d_in and dd_in from taps a fixed
// number of elements apart, so one decoder picks both the D_IPCLK and the
// DD_IPCLK tap. An AND-OR structure keeps the path from tap to output short.
// Combinational, zero-delay in RTL. With an all-zero select both outputs are 0.
module tap_mux #(
  parameter int N_IN = cdff_pkg::N_SEL
) (
  input  logic [N_IN-1:0] d_in,
  input  logic [N_IN-1:0] dd_in,
  input  logic [N_IN-1:0] sel_oh,
  output logic            d_out,
  output logic            dd_out
);
  timeunit 1ps;
  timeprecision 1fs;

  assign d_out  = |(d_in & sel_oh);
  assign dd_out = |(dd_in & sel_oh);

  // The select comes from a decoder and must be one-hot.
  always_comb assert ($onehot(sel_oh)) else $error("tap_mux: select is not one-hot");
endmodule
