// tb_cdff_test_top: end-to-end test of the delay-test clocking.
//
// The combinational block between the two CDFF registers is modelled as an
// inverter with a programmable transport delay tcomb (d2 = ~q1 delayed by
// tcomb); d1 is inverted every cycle so that q1 always toggles. A capture is
// "good" when register 2 takes the new ~q1, and a delay fault is "detected"
// when it takes the old one because tcomb exceeded the window. The window is
// the clock period in normal mode and Td1 + Td2 = 575 + 50*s ps in test mode
// (the flip-flop model has no propagation or setup time). The test covers:
//   normal mode at 2.5 GHz: pass with tcomb below the period, fault above;
//   test mode at 100 MHz, all 16 settings: pass at window-10 ps, fault at
//     window+10 ps;
//   test mode at 100 kHz: same windows, same outcomes;
//   t_offset: the time from the capturing CLK edge to the launching TCLK
//     edge equals 1/f - Td1 - Td2;
//   serial selection: a second instance built with SERIAL_SELECT = 1 is
//     loaded through its shift register and produces the loaded Td1.
// Each mechanism is counted and one that never happens counts as a failure.
module tb_cdff_test_top;
  timeunit 1ps;
  timeprecision 1fs;

  logic       ipclk, n_t;
  logic [3:0] s_pins;
  logic       sr_clk, sr_rst_n, sr_en, sr_in;
  real        vp, vn;
  logic       d1, q1, d2, q2, clk, tclk;
  logic       q1_b, q2_b, d2_b, clk_b, tclk_b;
  real        tcomb;
  realtime    t_clk_r, t_q1, t_tclk_r, t_tclk_f, t_tclk_b_r, t_tclk_b_f;
  int checks = 0, failures = 0;
  int n_normal_pass = 0, n_normal_fault = 0;
  int n_test_pass [16];
  int n_test_fault [16];
  int n_slow_pass = 0, n_slow_fault = 0, n_offset = 0, n_serial = 0;

  cdff_test_top u_top (
    .ipclk, .n_t, .s_pins, .sr_clk, .sr_rst_n, .sr_en, .sr_in, .vp, .vn,
    .d1, .q1, .d2, .q2, .clk, .tclk
  );

  // Serial-select instance; its registers are exercised through q1_b/d2_b.
  cdff_test_top #(.SERIAL_SELECT(1'b1)) u_top_serial (
    .ipclk, .n_t, .s_pins(4'd0), .sr_clk, .sr_rst_n, .sr_en, .sr_in, .vp, .vn,
    .d1(d1), .q1(q1_b), .d2(d2_b), .q2(q2_b), .clk(clk_b), .tclk(tclk_b)
  );

  // Combinational block under test.
  logic nq1, nq1_b;
  assign nq1   = !q1;
  assign nq1_b = !q1_b;
  transport_delay u_comb   (.in(nq1),   .dly(tcomb), .out(d2));
  transport_delay u_comb_b (.in(nq1_b), .dly(tcomb), .out(d2_b));

  always @(posedge clk)    t_clk_r    = $realtime;
  // t_offset seen at each launch: time since the last capturing CLK edge.
  realtime t_offset;
  always @(q1) begin t_q1 = $realtime; t_offset = $realtime - t_clk_r; end
  always @(posedge tclk)   t_tclk_r   = $realtime;
  always @(negedge tclk)   t_tclk_f   = $realtime;
  always @(posedge tclk_b) t_tclk_b_r = $realtime;
  always @(negedge tclk_b) t_tclk_b_f = $realtime;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic q1_old_prev;

  // One input-clock period, low phase first; d1 flips a quarter period after
  // the rising edge, away from every capture.
  task automatic period(input realtime per);
    ipclk = 1'b0;
    #(per / 2.0);
    ipclk = 1'b1;
    #(per / 4.0);
    d1 = !d1;
    #(per / 4.0);
  endtask

  // Runs `cycles` checked periods with comb delay tc. The value captured in
  // one period shows on q2 only after the next launch, so each expectation is
  // checked in the following period. Test mode: launch on this period's TCLK,
  // capture on this period's CLK, so register 2 takes ~q1 (new) if the path
  // is fast enough and ~q1 (previous) if not. Normal mode: launch and capture
  // share each rising edge, so the edge takes ~q1 launched one edge earlier,
  // or two edges earlier if the path is slow. n_ok counts matching captures.
  task automatic run(input realtime per, input realtime tc, input bit expect_pass,
                     input int cycles, output int n_ok);
    logic exp_q2, q1_old, have_exp;
    tcomb    = tc;
    n_ok     = 0;
    have_exp = 1'b0;
    exp_q2   = 1'b0;
    period(per);
    q1_old_prev = q1;
    period(per);
    for (int c = 0; c <= cycles; c++) begin
      q1_old = q1;
      ipclk = 1'b0;
      #(per / 2.0);
      if (have_exp) begin
        checks++;
        if (q2 === exp_q2) n_ok++;
        else begin
          failures++;
          $display("FAIL per=%0.1f tcomb=%0.1f q2=%b exp=%b at %0t", per, tc, q2, exp_q2, $realtime);
        end
      end
      if (n_t) exp_q2 = expect_pass ? !q1 : !q1_old;
      else begin
        exp_q2 = expect_pass ? !q1_old : !q1_old_prev;
        q1_old_prev = q1_old;
      end
      have_exp = 1'b1;
      ipclk = 1'b1;
      #(per / 4.0);
      d1 = !d1;
      #(per / 4.0);
    end
  endtask


  initial begin
    int g;
    for (int k = 0; k < 16; k++) begin n_test_pass[k] = 0; n_test_fault[k] = 0; end
    vp = 0.0;
    vn = 1.8;
    s_pins = 4'd0;
    sr_clk = 1'b0;
    sr_rst_n = 1'b1;
    sr_en = 1'b0;
    sr_in = 1'b0;
    d1 = 1'b0;
    tcomb = 10.0;
    q1_old_prev = 1'b0;
    ipclk = 1'b1;
    n_t = 1'b0;
    #10 sr_rst_n = 1'b0;
    #990 sr_rst_n = 1'b1;

    // Normal mode, 2.5 GHz (400 ps period).
    period(400.0);
    q1_old_prev = q1;
    run(400.0, 350.0, 1'b1, 6, g);
    n_normal_pass += g;
    run(400.0, 450.0, 1'b0, 6, g);
    n_normal_fault += g;

    // Test mode, 100 MHz, every setting.
    n_t = 1'b1;
    for (int k = 0; k < 16; k++) begin
      realtime win;
      s_pins = 4'(k);
      win = 575.0 + 50.0 * k;
      run(10_000.0, win - 10.0, 1'b1, 3, g);
      n_test_pass[k] += g;
      run(10_000.0, win + 10.0, 1'b0, 3, g);
      n_test_fault[k] += g;
    end

    // Test mode, 100 kHz: the window does not change with the period.
    for (int k = 0; k < 16; k += 5) begin
      realtime win;
      s_pins = 4'(k);
      win = 575.0 + 50.0 * k;
      run(10_000_000.0, win - 10.0, 1'b1, 2, g);
      n_slow_pass += g;
      run(10_000_000.0, win + 10.0, 1'b0, 2, g);
      n_slow_fault += g;
      // t_offset: from the capturing CLK edge to the next TCLK edge (which
      // also moves q1).
      checks++;
      if (t_offset < 10_000_000.0 - win - 0.01 ||
          t_offset > 10_000_000.0 - win + 0.01 ||
          t_q1 != t_tclk_r) begin
        failures++;
        $display("FAIL t_offset %0.3f expected %0.3f", t_offset, 10_000_000.0 - win);
      end else n_offset++;
    end

    // Serial selection on the second instance: load 9 (MSB first).
    begin
      logic [3:0] word;
      word = 4'd9;
      for (int i = 3; i >= 0; i--) begin
        sr_in = word[i];
        sr_en = 1'b1;
        #500 sr_clk = 1'b1;
        #500 sr_clk = 1'b0;
      end
      sr_en = 1'b0;
      period(10_000.0);
      period(10_000.0);
      checks++;
      if ((t_tclk_b_f - t_tclk_b_r) < 275.0 + 50.0 * 9 - 0.01 ||
          (t_tclk_b_f - t_tclk_b_r) > 275.0 + 50.0 * 9 + 0.01) begin
        failures++;
        $display("FAIL serial Td1 %0.3f", t_tclk_b_f - t_tclk_b_r);
      end else n_serial++;
    end

    // Every mechanism must have happened.
    checks++;
    if (n_normal_pass == 0 || n_normal_fault == 0 || n_slow_pass == 0 ||
        n_slow_fault == 0 || n_offset == 0 || n_serial == 0) begin
      failures++;
      $display("FAIL mechanism missing: normal pass %0d fault %0d slow pass %0d fault %0d offset %0d serial %0d",
               n_normal_pass, n_normal_fault, n_slow_pass, n_slow_fault, n_offset, n_serial);
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (n_test_pass[k] == 0 || n_test_fault[k] == 0) begin
        failures++;
        $display("FAIL setting %0d never passed (%0d) or never caught a fault (%0d)",
                 k, n_test_pass[k], n_test_fault[k]);
      end
    end
    $display("mechanisms: normal pass %0d, normal fault detected %0d, test pass/fault per setting %0d/%0d, slow pass %0d, slow fault %0d, t_offset %0d, serial select %0d",
             n_normal_pass, n_normal_fault, n_test_pass[0], n_test_fault[0], n_slow_pass, n_slow_fault, n_offset, n_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
