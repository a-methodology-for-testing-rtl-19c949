// cdff: controlled-delay flip-flop (CDFF), WIDTH bits side by side.
//
// A master-slave flip-flop whose master-to-slave transfer is gated by a
// second clock, the test clock TCLK:
//   master latch  transparent while CLK is low, holds while CLK is high;
//   slave latch   transparent while CLK and TCLK are both high.
// With TCLK held high (normal mode) this is an ordinary rising-edge flip-flop
// on CLK. In test mode the master still captures D on the rising edge of CLK,
// but Q does not change until TCLK rises, so Q appears t_offset after the
// CLK edge, t_offset being the time from the CLK rising edge to the next TCLK
// rising edge. The slave closes when CLK falls even if TCLK is still high, so
// master and slave are never open together.
//
// The enable of the slave, CLK AND TCLK, is this implementation's reading of
// the control logic from the flip-flop's described behaviour: normal
// operation with TCLK high, and data transferred to the slave on the test
// clock in test mode. The circuit has no reset, like the flip-flop it models.
//
// The two latches are intended: the circuit warnings about latches on m_q and
// q are expected for this cell.
module cdff #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             tclk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [WIDTH-1:0] m_q;
  logic             slave_en;

  assign slave_en = clk & tclk;

  always_latch begin
    if (!clk) m_q = d;
  end

  always_latch begin
    if (slave_en) q = m_q;
  end
endmodule
