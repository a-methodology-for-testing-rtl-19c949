// cdff_pkg: constants and types shared by the controlled-delay flip-flop (CDFF)
// test-clock generator.
//
// The generator turns a slow, 50%-duty input clock into a narrow test clock
// (TCLK) pulse of width Td1 and a clock (CLK) low pulse that trails it by Td2.
// Td1 is programmable in 16 steps of one delay element (50 ps) from 275 ps to
// 1025 ps, and Td2 is fixed at 300 ps (six elements). These numbers are the
// ones the design is built around; the voltage levels (1.8 V supply, 0.45 V
// threshold) and the gate delays below are this implementation's own choices
// for its behavioural timing models.
package cdff_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Operating mode, the N/T select pin: 0 = normal, 1 = test.
  typedef enum logic {
    MODE_NORMAL = 1'b0,
    MODE_TEST   = 1'b1
  } mode_e;

  // Delay selection: four select inputs S0-S3, 16 settings.
  localparam int SEL_W = 4;
  localparam int N_SEL = 1 << SEL_W;

  // Nominal falling-edge delay of one delay element, in ps.
  localparam realtime T_ELEM = 50.0;

  // Delay-line organisation. The programmable line has PROG_ELEMS elements
  // and PROG_ELEMS+1 tap points (tap 0 is the line input). Setting k selects
  // tap D_TAP_BASE+k for D_IPCLK and tap D_TAP_BASE+k+TD2_ELEMS for DD_IPCLK,
  // so the two always differ by Td2. The fixed line is TD2_ELEMS long.
  localparam int PROG_ELEMS = 26;
  localparam int TD2_ELEMS  = 6;
  localparam int D_TAP_BASE = 5;

  // Supply and threshold voltages used by the delay-element model, in volts.
  localparam real VDD = 1.8;
  localparam real VSS = 0.0;
  localparam real VTH = 0.45;

  // Gate delays of the pulse-forming network, in ps. The buffers are made
  // 25 ps faster than the multiplexer-plus-inverter path so that the shortest
  // TCLK pulse comes out at 275 ps from a tap spacing of 50 ps.
  localparam realtime T_INV  = 60.0;
  localparam realtime T_BUF  = 35.0;
  localparam realtime T_GATE = 40.0;

  // Designed pulse widths, in ps.
  localparam realtime TD1_MIN = 275.0;
  localparam realtime TD2     = TD2_ELEMS * T_ELEM;

  // Td1 for delay setting k.
  function automatic realtime td1_of(input int unsigned k);
    return TD1_MIN + T_ELEM * k;
  endfunction
endpackage
