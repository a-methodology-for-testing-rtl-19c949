// tb_clk_gate_network: feeds the gate network with ideal delayed copies of a
// 50%-duty input clock, as the delay lines would produce them for setting k
// (fixed line 300 ps, d_tap 250+50k ps, dd_tap 550+50k ps on falling edges,
// shorter delays on rising edges), and checks:
//   CLK1 is one high pulse per input period, 275+50k ps wide;
//   CLK2 is one low pulse per input period, equally wide;
//   CLK2 falls 300 ps after CLK1 rises;
//   no pulse forms on the input's rising edge.
module tb_clk_gate_network;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime PERIOD = 10_000.0;
  logic    ipclk, fixed_tap, d_tap, dd_tap, clk1, clk2;
  real     dly_d, dly_dd;
  realtime t_c1r, t_c1f, t_c2f, t_c2r;
  int      n_c1 = 0, n_c2 = 0;
  int checks = 0, failures = 0;

  clk_gate_network dut (.ipclk, .fixed_tap, .d_tap, .dd_tap, .clk1, .clk2);

  // Ideal delay lines: falling edges delayed by the programmed amount,
  // rising edges by 60% of it.
  // Each line is the OR of a slow and a fast transport copy of the input.
  real  r_fix = 180.0, f_fix = 300.0, r_d, r_dd;
  logic fx_r, fx_f, d_r, d_f, dd_r, dd_f;
  transport_delay u_fx_r (.in(ipclk), .dly(r_fix),  .out(fx_r));
  transport_delay u_fx_f (.in(ipclk), .dly(f_fix),  .out(fx_f));
  transport_delay u_d_r  (.in(ipclk), .dly(r_d),    .out(d_r));
  transport_delay u_d_f  (.in(ipclk), .dly(dly_d),  .out(d_f));
  transport_delay u_dd_r (.in(ipclk), .dly(r_dd),   .out(dd_r));
  transport_delay u_dd_f (.in(ipclk), .dly(dly_dd), .out(dd_f));
  assign fixed_tap = fx_r | fx_f;
  assign d_tap     = d_r | d_f;
  assign dd_tap    = dd_r | dd_f;
  assign r_d  = 0.6 * dly_d;
  assign r_dd = 0.6 * dly_dd;

  always @(posedge clk1) begin t_c1r = $realtime; n_c1++; end
  always @(negedge clk1) t_c1f = $realtime;
  always @(negedge clk2) begin t_c2f = $realtime; n_c2++; end
  always @(posedge clk2) t_c2r = $realtime;

  task automatic near(input realtime got, input realtime exp, input string what, input int k);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL k=%0d %s: got %0.3f expected %0.3f", k, what, got, exp);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ipclk  = 1'b1;
    dly_d  = 250.0;
    dly_dd = 550.0;
    #(PERIOD);
    for (int k = 0; k < 16; k++) begin
      dly_d  = 250.0 + 50.0 * k;
      dly_dd = 550.0 + 50.0 * k;
      for (int p = 0; p < 2; p++) begin
        int c1, c2;
        c1 = n_c1;
        c2 = n_c2;
        ipclk = 1'b0;
        #(PERIOD / 2);
        ipclk = 1'b1;
        #(PERIOD / 2);
        near(t_c1f - t_c1r, 275.0 + 50.0 * k, "CLK1 width (Td1)", k);
        near(t_c2r - t_c2f, 275.0 + 50.0 * k, "CLK2 low width", k);
        near(t_c2f - t_c1r, 300.0, "CLK1 to CLK2 (Td2)", k);
        checks++;
        if (n_c1 - c1 != 1 || n_c2 - c2 != 1) begin
          failures++;
          $display("FAIL k=%0d pulses per period: CLK1 %0d CLK2 %0d", k, n_c1 - c1, n_c2 - c2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
