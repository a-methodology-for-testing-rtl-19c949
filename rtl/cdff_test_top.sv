// cdff_test_top: low-frequency delay-test clocking for circuits built from
// controlled-delay flip-flops (CDFFs).
//
// The top holds the on-chip test-clock generator, the mode multiplexer and
// the two CDFF registers of the basic test configuration:
//
//   d1 -> [CDFF reg 1] -> q1 -> (combinational block under test) -> d2
//      -> [CDFF reg 2] -> q2
//
// The combinational block is the user's logic; its input q1 and output d2
// are ports. In normal mode (n_t = 0) both registers are ordinary flip-flops
// on ipclk. In test mode (n_t = 1) ipclk is a slow 50%-duty clock and each of
// its falling edges yields a TCLK pulse (CLK1) of width Td1 and, Td2 = 300 ps
// later, a CLK low pulse (CLK2) of the same width. Register 1 launches on the
// TCLK rising edge and register 2 captures on the following CLK rising edge,
// so the combinational block gets a window of Td1 + Td2 (575..1325 ps, less
// flip-flop propagation and setup time) however long the ipclk period is.
//
// Delay selection: with SERIAL_SELECT = 0 (default) the select comes from the
// four pins s_pins (S0-S3). With SERIAL_SELECT = 1 it comes from a shift
// register loaded through sr_in, which saves three pins. The shift register is
// present either way. vp and vn are the delay lines' control voltages in volts
// (full speed at vp = 0, vn = 1.8). clk and tclk are also brought out for
// the clock driving networks of the rest of the chip.
module cdff_test_top
  import cdff_pkg::*;
#(
  parameter int WIDTH         = 1,
  parameter bit SERIAL_SELECT = 1'b0
) (
  input  logic             ipclk,
  input  logic             n_t,
  input  logic [SEL_W-1:0] s_pins,
  input  logic             sr_clk,
  input  logic             sr_rst_n,
  input  logic             sr_en,
  input  logic             sr_in,
  input  real              vp,
  input  real              vn,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] q1,
  input  logic [WIDTH-1:0] d2,
  output logic [WIDTH-1:0] q2,
  output logic             clk,
  output logic             tclk
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [SEL_W-1:0] s_serial, s;
  logic             clk1, clk2;
  mode_e            mode;

  sel_shift_reg u_sel_sr (
    .sr_clk  (sr_clk),
    .sr_rst_n(sr_rst_n),
    .sr_en   (sr_en),
    .sr_in   (sr_in),
    .s       (s_serial)
  );

  assign s    = SERIAL_SELECT ? s_serial : s_pins;
  assign mode = mode_e'(n_t);

  test_clock_gen u_gen (
    .ipclk(ipclk),
    .s    (s),
    .vp   (vp),
    .vn   (vn),
    .clk1 (clk1),
    .clk2 (clk2)
  );

  mode_mux u_mode (
    .n_t  (mode),
    .ipclk(ipclk),
    .clk1 (clk1),
    .clk2 (clk2),
    .clk  (clk),
    .tclk (tclk)
  );

  cdff #(.WIDTH(WIDTH)) u_reg1 (
    .clk (clk),
    .tclk(tclk),
    .d   (d1),
    .q   (q1)
  );

  cdff #(.WIDTH(WIDTH)) u_reg2 (
    .clk (clk),
    .tclk(tclk),
    .d   (d2),
    .q   (q2)
  );
endmodule
