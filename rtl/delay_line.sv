// delay_line: a chain of N current-starved delay elements with every
// intermediate node brought out as a tap. Behavioural, because the elements
// are.
//
// taps[0] is the line input and taps[i] the output of element i, so a falling
// edge reaches taps[i] i*T_ELEM (50 ps) after it enters, at full bias. All
// elements share the control voltages vp and vn, as the cells of one line
// share their current-control transistors. The same module serves as the
// tapped programmable line (N = 26) and as the fixed Td2 line (N = 6).
module delay_line #(
  parameter int N = cdff_pkg::PROG_ELEMS
) (
  input  logic       in,
  input  real        vp,
  input  real        vn,
  output logic [N:0] taps
);
  timeunit 1ps;
  timeprecision 1fs;

  assign taps[0] = in;

  for (genvar i = 0; i < N; i++) begin : g_elem
    delay_element u_elem (
      .in (taps[i]),
      .vp (vp),
      .vn (vn),
      .out(taps[i+1])
    );
  end
endmodule
