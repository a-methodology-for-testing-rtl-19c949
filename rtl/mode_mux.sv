// mode_mux: selects the clocks sent to the clock driving networks.
//
//   N/T = 0 (normal): CLK = IPCLK, TCLK = 1
//   N/T = 1 (test)  : CLK = CLK2,  TCLK = CLK1
//
// With TCLK held high every controlled-delay flip-flop behaves as an ordinary
// master-slave flip-flop clocked by IPCLK at its rated frequency. In test mode
// both clocks come from test_clock_gen. Combinational; the mode pin is meant
// to be static while clocks run.
module mode_mux
  import cdff_pkg::*;
(
  input  mode_e n_t,
  input  logic  ipclk,
  input  logic  clk1,
  input  logic  clk2,
  output logic  clk,
  output logic  tclk
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    unique case (n_t)
      MODE_TEST: begin
        clk  = clk2;
        tclk = clk1;
      end
      default: begin
        clk  = ipclk;
        tclk = 1'b1;
      end
    endcase
  end
endmodule
