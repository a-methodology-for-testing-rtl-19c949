// test_clock_gen: generates CLK1 and CLK2 from the input clock IPCLK.
//
// Each falling edge of IPCLK produces one CLK1 high pulse of width Td1 and,
// Td2 after the CLK1 rising edge, one CLK2 low pulse of the same width.
// Td1 = 275 ps + 50 ps * s for select s = 0..15 (275..1025 ps); Td2 = 300 ps.
// Because both pulses are formed from the falling edge only, the distance
// between one set of pulses and the next is the IPCLK period, which can be
// made as long as wanted without touching Td1 or Td2. The rising edge of
// IPCLK must arrive after the falling edge has left the end of the lines:
// the rise delay of the elements is shorter than the fall delay, so the IPCLK
// low phase shrinks by 20 ps per element along the chain, which sets an upper
// limit (about 1 GHz with the model's delays) on the test-mode input clock.
//
// Structure: prog_delay_line (taps for D_IPCLK and DD_IPCLK), a fixed
// six-element delay_line for DB_IPCLK, and clk_gate_network. Behavioural.
module test_clock_gen
  import cdff_pkg::*;
(
  input  logic             ipclk,
  input  logic [SEL_W-1:0] s,
  input  real              vp,
  input  real              vn,
  output logic             clk1,
  output logic             clk2
);
  timeunit 1ps;
  timeprecision 1fs;

  logic             d_tap, dd_tap;
  logic [TD2_ELEMS:0] fixed_taps;

  prog_delay_line u_prog (
    .ipclk (ipclk),
    .s     (s),
    .vp    (vp),
    .vn    (vn),
    .d_tap (d_tap),
    .dd_tap(dd_tap)
  );

  delay_line #(.N(TD2_ELEMS)) u_fixed (
    .in  (ipclk),
    .vp  (vp),
    .vn  (vn),
    .taps(fixed_taps)
  );

  clk_gate_network u_gates (
    .ipclk    (ipclk),
    .fixed_tap(fixed_taps[TD2_ELEMS]),
    .d_tap    (d_tap),
    .dd_tap   (dd_tap),
    .clk1     (clk1),
    .clk2     (clk2)
  );
endmodule
