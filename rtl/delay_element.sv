// delay_element: behavioural model of the current-starved delay element
// (two cascaded inverters with current-control transistors). Not synthesizable;
// it stands for a transistor-level cell.
//
// The element passes its input through non-inverted. Only the delay of a
// falling input edge is controlled: that edge is carried by the pull-up of
// the first stage (starved by the PMOS gated by vp) and the pull-down of the
// second stage (starved by the NMOS gated by vn). With vp at VSS and vn at VDD
// the falling delay is T_FALL (50 ps). Moving vp towards VDD-VTH or vn towards
// VSS+VTH starves the stage and makes the delay grow without bound. A rising
// input edge goes through the unstarved transistors and takes the shorter,
// fixed T_RISE.
//
// Model: each half of the falling delay scales with the inverse of the gate
// overdrive of its control transistor (current roughly linear in overdrive),
// which is this model's own choice; the cell's real curve comes from circuit
// simulation. The output is the OR of two transport-delayed copies of the
// input, one delayed by the rise time and one by the fall time. This gives
// exact edges for every low pulse, swallows low pulses shorter than
// T_FALL-T_RISE as a real stage would, and only splits a high pulse shorter
// than T_FALL-T_RISE into two.
//
// Ports: in/out logic; vp, vn are control voltages in volts. Timing: out
// falls T_FALL after in falls (full bias), rises T_RISE after in rises.
module delay_element
  import cdff_pkg::*;
#(
  parameter realtime T_FALL = cdff_pkg::T_ELEM,  // ps, falling input at full bias
  parameter realtime T_RISE = 30.0               // ps, rising input
) (
  input  logic in,
  input  real  vp,
  input  real  vn,
  output logic out
);
  timeunit 1ps;
  timeprecision 1fs;

  // Smallest overdrive the model uses, to keep the delay finite.
  localparam real OV_MIN = 0.01;

  real     ov_p, ov_n;
  real     t_fall;
  logic    in_r, in_f;

  always_comb begin
    ov_p   = VDD - vp - VTH;
    ov_n   = vn - VSS - VTH;
    if (ov_p < OV_MIN) ov_p = OV_MIN;
    if (ov_n < OV_MIN) ov_n = OV_MIN;
    t_fall = 0.5 * T_FALL * (VDD - VSS - VTH) / ov_p
           + 0.5 * T_FALL * (VDD - VSS - VTH) / ov_n;
  end

  transport_delay u_rise (.in(in), .dly(T_RISE), .out(in_r));
  transport_delay u_fall (.in(in), .dly(t_fall), .out(in_f));

  assign out = in_r | in_f;
endmodule
