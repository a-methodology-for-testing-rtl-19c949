// prog_delay_line: the programmable delay line of the test-clock generator.
// A 26-element tapped chain of delay elements, a 4x16 decoder and a 16:1
// multiplexer with two outputs.
//
// For delay setting s (S0-S3, 0..15) the decoder enables one multiplexer
// input pair, and the line delivers two copies of its input:
//   d_tap  = tap D_TAP_BASE+s               (delay (5+s)*50 ps)
//   dd_tap = tap D_TAP_BASE+s+TD2_ELEMS     (delay (11+s)*50 ps)
// so dd_tap always trails d_tap by Td2 = 300 ps, whatever the setting, and a
// single decoder serves both. The delays are those of a falling input edge at
// full bias; the inverters that follow the multiplexer belong to
// clk_gate_network. The choice of taps 5..20 and 11..26, and hence a 26-element
// chain, is this implementation's reading of how the shortest pulse of 275 ps
// and the longest delay of 1325 ps are reached with 50 ps elements.
// Taps 0-4 are not selectable: lint reports them as unused, which is
// expected. Behavioural, because the chain is.
module prog_delay_line
  import cdff_pkg::*;
#(
  parameter int N_ELEMS = cdff_pkg::PROG_ELEMS,
  parameter int D_BASE  = cdff_pkg::D_TAP_BASE,
  parameter int TD2_N   = cdff_pkg::TD2_ELEMS
) (
  input  logic             ipclk,
  input  logic [SEL_W-1:0] s,
  input  real              vp,
  input  real              vn,
  output logic             d_tap,
  output logic             dd_tap
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_ELEMS:0] taps;
  logic [N_SEL-1:0] sel_oh;
  logic [N_SEL-1:0] d_in, dd_in;

  delay_line #(.N(N_ELEMS)) u_chain (
    .in  (ipclk),
    .vp  (vp),
    .vn  (vn),
    .taps(taps)
  );

  decoder_4x16 #(.SEL_W(SEL_W)) u_dec (
    .s     (s),
    .sel_oh(sel_oh)
  );

  assign d_in  = taps[D_BASE +: N_SEL];
  assign dd_in = taps[D_BASE+TD2_N +: N_SEL];

  tap_mux #(.N_IN(N_SEL)) u_mux (
    .d_in  (d_in),
    .dd_in (dd_in),
    .sel_oh(sel_oh),
    .d_out (d_tap),
    .dd_out(dd_tap)
  );

  // The longest selected tap must exist on the chain.
  if (D_BASE + TD2_N + N_SEL - 1 > N_ELEMS) begin : g_len_check
    $error("prog_delay_line: chain too short for the selected taps");
  end
endmodule
