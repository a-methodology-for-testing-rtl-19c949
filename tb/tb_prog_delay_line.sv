// tb_prog_delay_line: for each of the 16 settings, checks that the falling
// edge of the input reaches d_tap after (5+s)*50 ps and dd_tap after
// (11+s)*50 ps, i.e. that the two outputs are always 300 ps apart, and that
// the rising edge reaches d_tap after (5+s)*30 ps.
module tb_prog_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  logic       ipclk, d_tap, dd_tap;
  logic [3:0] s;
  real        vp, vn;
  realtime    t0, tf_d, tf_dd, tr_d;
  int checks = 0, failures = 0;

  prog_delay_line dut (.ipclk, .s, .vp, .vn, .d_tap, .dd_tap);

  always @(negedge d_tap)  tf_d  = $realtime;
  always @(negedge dd_tap) tf_dd = $realtime;
  always @(posedge d_tap)  tr_d  = $realtime;

  task automatic near(input realtime got, input realtime exp, input string what, input int k);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL s=%0d %s: got %0.3f expected %0.3f", k, what, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vp = 0.0;
    vn = 1.8;
    s  = 4'd0;
    ipclk = 1'b1;
    #100 ipclk = 1'b0;
    #100 ipclk = 1'b1;
    #3000;
    for (int k = 0; k < 16; k++) begin
      s = 4'(k);
      #3000;
      t0 = $realtime;
      ipclk = 1'b0;
      #3000;
      near(tf_d - t0, 50.0 * (5 + k), "d_tap fall", k);
      near(tf_dd - t0, 50.0 * (11 + k), "dd_tap fall", k);
      near(tf_dd - tf_d, 300.0, "Td2 spacing", k);
      t0 = $realtime;
      ipclk = 1'b1;
      #3000;
      near(tr_d - t0, 30.0 * (5 + k), "d_tap rise", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
