// tb_cdff_test_top_full: the top at its default parameters, run through the
// basic test-mode experiment: setting 0 (Td1 = 275 ps, Td2 = 300 ps), a
// random data stream on d1, and a 500 ps inverting path from q1 to d2, at an
// input clock of 100 MHz and then 100 kHz. Checks, at both frequencies:
//   q1 shows, right after each TCLK rising edge, the d1 value captured at the
//     previous CLK rising edge;
//   the CLK-to-Q delay equals 1/f - Td1 - Td2, so a longer period shows up
//     only as a longer CLK-to-Q delay;
//   q2 captures ~q1 through the 500 ps path (window 575 ps) in every period.
// A short normal-mode run at 2.5 GHz comes first.
module tb_cdff_test_top_full;
  timeunit 1ps;
  timeprecision 1fs;

  logic       ipclk, n_t;
  logic [3:0] s_pins;
  logic       sr_clk, sr_rst_n, sr_en, sr_in;
  real        vp, vn, tcomb;
  logic       d1, q1, d2, q2, clk, tclk, nq1;
  realtime    t_clk_r, t_q1;
  int checks = 0, failures = 0;
  int n_fast = 0, n_slow = 0, n_normal = 0;

  cdff_test_top u_top (
    .ipclk, .n_t, .s_pins, .sr_clk, .sr_rst_n, .sr_en, .sr_in, .vp, .vn,
    .d1, .q1, .d2, .q2, .clk, .tclk
  );

  assign nq1 = !q1;
  transport_delay u_comb (.in(nq1), .dly(tcomb), .out(d2));

  always @(posedge clk) t_clk_r = $realtime;
  always @(q1) t_q1 = $realtime;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CLK-to-Q delay seen at each TCLK rising edge (the launch): the time
  // since the previous capturing CLK edge.
  realtime t_c2q;
  always @(posedge tclk) t_c2q = $realtime - t_clk_r;

  logic prev_cap;

  // One test-mode period: the low phase carries launch (TCLK) and capture
  // (CLK); d1 gets a new random value in the high phase.
  task automatic test_period(input realtime per, input bit check_it, output bit ok);
    logic q1_before;
    ok = 1'b1;
    q1_before = q1;
    ipclk = 1'b0;
    #(per / 2.0);
    if (check_it) begin
      checks++;
      if (q1 !== prev_cap) begin
        failures++; ok = 1'b0;
        $display("FAIL q1=%b expected %b", q1, prev_cap);
      end
      checks++;
      if (t_c2q < per - 575.0 - 0.01 || t_c2q > per - 575.0 + 0.01) begin
        failures++; ok = 1'b0;
        $display("FAIL CLK-to-Q %0.3f expected %0.3f", t_c2q, per - 575.0);
      end
      checks++;
      if (q2 !== !q1_before) begin
        failures++; ok = 1'b0;
        $display("FAIL q2=%b expected %b", q2, !q1_before);
      end
    end
    prev_cap = d1;             // captured at this period's CLK rising edge
    ipclk = 1'b1;
    #(per / 4.0);
    d1 = 1'($urandom);
    #(per / 4.0);
  endtask

  initial begin
    bit ok;
    vp = 0.0;
    vn = 1.8;
    s_pins = 4'd0;
    sr_clk = 1'b0;
    sr_rst_n = 1'b1;
    sr_en = 1'b0;
    sr_in = 1'b0;
    d1 = 1'b0;
    tcomb = 500.0;
    ipclk = 1'b1;
    n_t = 1'b0;
    #1000;
    // Normal mode: ordinary flip-flops at 2.5 GHz, q1 follows d1 per edge.
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = 1'($urandom);
      d1 = v;
      #200 ipclk = 1'b0;
      #200 ipclk = 1'b1;
      #1;
      checks++;
      if (q1 !== v) begin failures++; $display("FAIL normal q1=%b exp=%b", q1, v); end
      else n_normal++;
    end
    n_t = 1'b1;
    for (int w = 0; w < 3; w++) test_period(10_000.0, 1'b0, ok);
    for (int i = 0; i < 20; i++) begin
      test_period(10_000.0, 1'b1, ok);
      if (ok) n_fast++;
    end
    test_period(10_000_000.0, 1'b0, ok);   // first slow period: new spacing
    for (int i = 0; i < 10; i++) begin
      test_period(10_000_000.0, 1'b1, ok);
      if (ok) n_slow++;
    end
    checks++;
    if (n_fast == 0 || n_slow == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a mode never ran cleanly: normal %0d 100MHz %0d 100kHz %0d", n_normal, n_fast, n_slow);
    end
    $display("clean periods: normal %0d, 100 MHz %0d, 100 kHz %0d", n_normal, n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
