// tb_test_clock_gen: runs the complete generator from a 50%-duty input clock
// at 100 MHz and at 100 kHz and, for every delay setting, measures
//   Td1 = CLK1 high width, expected 275 + 50*s ps;
//   Td2 = CLK1 rising edge to CLK2 falling edge, expected 300 ps;
//   CLK2 low width, equal to Td1;
//   one CLK1 pulse and one CLK2 pulse per input period;
//   CLK1 rising edge 75 ps (buffer plus gate) after the input falling edge.
// It then raises vp, with vn = 1.8 V - vp, and checks that Td1 and Td2 grow.
module tb_test_clock_gen;
  timeunit 1ps;
  timeprecision 1fs;

  logic       ipclk, clk1, clk2;
  logic [3:0] s;
  real        vp, vn;
  realtime    t_fall_in, t_c1r, t_c1f, t_c2f, t_c2r;
  int         n_c1 = 0, n_c2 = 0;
  int checks = 0, failures = 0;

  test_clock_gen dut (.ipclk, .s, .vp, .vn, .clk1, .clk2);

  always @(posedge clk1) begin t_c1r = $realtime; n_c1++; end
  always @(negedge clk1) t_c1f = $realtime;
  always @(negedge clk2) begin t_c2f = $realtime; n_c2++; end
  always @(posedge clk2) t_c2r = $realtime;

  task automatic near(input realtime got, input realtime exp, input string what, input int k);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL s=%0d %s: got %0.3f expected %0.3f", k, what, got, exp);
    end
  endtask

  task automatic period(input realtime per);
    ipclk = 1'b0;
    t_fall_in = $realtime;
    #(per / 2.0);
    ipclk = 1'b1;
    #(per / 2.0);
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime pers [2] = '{10_000.0, 10_000_000.0};   // 100 MHz, 100 kHz
    vp = 0.0;
    vn = 1.8;
    s  = 4'd0;
    ipclk = 1'b1;
    #5000;
    period(10_000.0);
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < 16; k++) begin
        int c1, c2;
        s = 4'(k);
        period(pers[f]);          // settle after changing s
        c1 = n_c1;
        c2 = n_c2;
        period(pers[f]);
        near(t_c1f - t_c1r, 275.0 + 50.0 * k, "Td1", k);
        near(t_c2f - t_c1r, 300.0, "Td2", k);
        near(t_c2r - t_c2f, 275.0 + 50.0 * k, "CLK2 low width", k);
        near(t_c1r - t_fall_in, 75.0, "CLK1 rise after IPCLK fall", k);
        checks++;
        if (n_c1 - c1 != 1 || n_c2 - c2 != 1) begin
          failures++;
          $display("FAIL s=%0d f=%0d pulses per period CLK1 %0d CLK2 %0d", k, f, n_c1 - c1, n_c2 - c2);
        end
      end
    end
    // Starving the elements lengthens Td1 and Td2. With one control voltage
    // derived from the other (vn = VDD + VSS - vp), both must grow steadily
    // as vp rises.
    begin
      realtime last_td1, last_td2;
      s = 4'd0;
      last_td1 = 275.0;
      last_td2 = 300.0;
      for (int i = 1; i <= 4; i++) begin
        vp = 0.15 * i;
        vn = 1.8 - vp;
        period(20_000.0);
        period(20_000.0);
        checks++;
        if (t_c1f - t_c1r <= last_td1 || t_c2f - t_c1r <= last_td2) begin
          failures++;
          $display("FAIL vp=%0.2f: Td1 %0.3f Td2 %0.3f did not grow", vp, t_c1f - t_c1r, t_c2f - t_c1r);
        end
        last_td1 = t_c1f - t_c1r;
        last_td2 = t_c2f - t_c1r;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
