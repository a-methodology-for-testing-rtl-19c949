// tb_delay_element: measures the falling and rising delay of one element at
// full bias and with each control voltage backed off, and checks pulse
// handling: a long low pulse shrinks by T_FALL - T_RISE, a low pulse shorter
// than that is swallowed. Expected delays are computed here from the model's
// stated law: each half of the 50 ps falling delay scales with
// (VDD - VTH) / overdrive of its control transistor.
module tb_delay_element;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real VDD = 1.8, VTH = 0.45;
  logic    in, out;
  real     vp, vn;
  realtime t_in, t_fall_out, t_rise_out;
  int      n_fall = 0;
  int checks = 0, failures = 0;

  delay_element dut (.in, .vp, .vn, .out);

  always @(negedge out) begin t_fall_out = $realtime; n_fall++; end
  always @(posedge out) t_rise_out = $realtime;

  task automatic near(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: got %0.3f ps, expected %0.3f ps", what, got, exp);
    end
  endtask

  // One low pulse of the given width, then a long high phase.
  task automatic pulse(input realtime w);
    in = 1'b0;
    t_in = $realtime;
    #(w);
    in = 1'b1;
    #2000;
  endtask

  function automatic real fall_exp(input real p, input real n);
    return 25.0 * (VDD - VTH) / (VDD - p - VTH) + 25.0 * (VDD - VTH) / (n - VTH);
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ps [4] = '{0.0, 0.6, 0.0, 0.3};
    real ns [4] = '{1.8, 1.8, 1.2, 1.5};
    in = 1'b1;
    vp = 0.0;
    vn = 1.8;
    #1000;
    in = 1'b0; #10 in = 1'b1;   // settle the model's internal state
    #1000;
    for (int c = 0; c < 4; c++) begin
      vp = ps[c];
      vn = ns[c];
      #10;
      pulse(500.0);
      near(t_fall_out - t_in, fall_exp(vp, vn), "falling delay");
      near(t_rise_out - (t_in + 500.0), 30.0, "rising delay");
    end
    near(fall_exp(0.0, 1.8), 50.0, "nominal delay is 50 ps");
    vp = 0.0;
    vn = 1.8;
    #10;
    // Pulse shorter than T_FALL - T_RISE = 20 ps is swallowed.
    begin
      int n_before;
      n_before = n_fall;
      pulse(15.0);
      checks++;
      if (n_fall != n_before) begin failures++; $display("FAIL short pulse passed"); end
    end
    // A 100 ps low pulse comes out 80 ps wide.
    pulse(100.0);
    near(t_rise_out - t_fall_out, 80.0, "pulse shrink");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
