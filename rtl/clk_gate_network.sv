// clk_gate_network: the buffers, inverters and gates that turn the delayed
// copies of IPCLK into CLK1 (the test clock) and CLK2 (the clock in test
// mode). Behavioural, because its function rests on the relative delays of
// its gates.
//
//   B_IPCLK  = buffer(IPCLK)                  delay T_BUF
//   D_IPCLK  = NOT(d_tap)                     delay T_INV
//   CLK1     = NOR(B_IPCLK, D_IPCLK)          delay T_GATE
//   DB_IPCLK = buffer(fixed Td2 line output)  delay T_BUF
//   DD_IPCLK = NOT(dd_tap)                    delay T_INV
//   CLK2     = OR(DB_IPCLK, DD_IPCLK)         delay T_GATE
//
// When IPCLK falls, B_IPCLK falls at once (after the buffer) while D_IPCLK
// stays low until the falling edge has run through the selected tap, so CLK1
// is a high pulse of width Td1 = tap delay + T_INV - T_BUF. The same happens
// Td2 later on DB_IPCLK and DD_IPCLK, giving CLK2 a low pulse of the same
// width trailing CLK1 by Td2. When IPCLK rises, B_IPCLK and DB_IPCLK rise
// before the inverted taps fall, so no pulse is formed. The NOR and OR share
// one delay, T_GATE, so the two clocks see the same gate delay; the buffer is
// 25 ps faster than the multiplexer and inverter, which sets the shortest
// pulse to 275 ps. The delay values are this implementation's own; only their
// difference matters.
module clk_gate_network
  import cdff_pkg::*;
#(
  parameter realtime TB  = cdff_pkg::T_BUF,
  parameter realtime TI  = cdff_pkg::T_INV,
  parameter realtime TG  = cdff_pkg::T_GATE
) (
  input  logic ipclk,      // input clock
  input  logic fixed_tap,  // IPCLK delayed by the fixed Td2 line
  input  logic d_tap,      // programmable line, Td1 tap
  input  logic dd_tap,     // programmable line, Td1+Td2 tap
  output logic clk1,       // test clock in test mode
  output logic clk2        // clock in test mode
);
  timeunit 1ps;
  timeprecision 1fs;

  logic b_ipclk, d_ipclk, db_ipclk, dd_ipclk;
  logic n_d_tap, n_dd_tap, nor1, or2;

  assign n_d_tap  = !d_tap;
  assign n_dd_tap = !dd_tap;
  assign nor1     = !(b_ipclk || d_ipclk);
  assign or2      = db_ipclk || dd_ipclk;

  transport_delay u_b_buf  (.in(ipclk),     .dly(TB), .out(b_ipclk));
  transport_delay u_d_inv  (.in(n_d_tap),   .dly(TI), .out(d_ipclk));
  transport_delay u_db_buf (.in(fixed_tap), .dly(TB), .out(db_ipclk));
  transport_delay u_dd_inv (.in(n_dd_tap),  .dly(TI), .out(dd_ipclk));
  transport_delay u_nor    (.in(nor1),      .dly(TG), .out(clk1));
  transport_delay u_or     (.in(or2),       .dly(TG), .out(clk2));
endmodule
