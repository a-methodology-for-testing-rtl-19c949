// tb_mode_mux: checks the mode table for every combination of the clock
// inputs: normal mode passes IPCLK and holds TCLK high, test mode passes
// CLK2 and CLK1.
module tb_mode_mux;
  timeunit 1ps;
  timeprecision 1fs;
  import cdff_pkg::*;

  mode_e n_t;
  logic  ipclk, clk1, clk2, clk, tclk;
  logic  exp_clk, exp_tclk;
  int checks = 0, failures = 0;

  mode_mux dut (.n_t, .ipclk, .clk1, .clk2, .clk, .tclk);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      n_t   = mode_e'(v[3]);
      ipclk = v[0];
      clk1  = v[1];
      clk2  = v[2];
      #10;
      exp_clk  = v[3] ? v[2] : v[0];
      exp_tclk = v[3] ? v[1] : 1'b1;
      checks++;
      if (clk !== exp_clk || tclk !== exp_tclk) begin
        failures++;
        $display("FAIL v=%b clk=%b tclk=%b", 4'(v), clk, tclk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
