// tb_cdff: checks the controlled-delay flip-flop in both modes.
// Normal mode (TCLK high): Q takes D at each CLK rising edge and holds
// otherwise. Test mode: CLK is mostly high with short low pulses and TCLK
// carries short high pulses; D is captured at the CLK rising edge that ends
// a low pulse, Q must not change until the next TCLK rising edge, and Q
// holds when D changes while CLK is high.
module tb_cdff;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int W = 8;
  logic         clk, tclk;
  logic [W-1:0] d, q, exp_q, last_q;
  int checks = 0, failures = 0;

  cdff #(.WIDTH(W)) dut (.clk, .tclk, .d, .q);

  task automatic check(input logic [W-1:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s q=%h exp=%h at %0t", what, q, e, $realtime);
    end
  endtask

  // Value Q must show between the capture of cycle i-1 and the TCLK of cycle i.
  function automatic logic [W-1:0] cap_prev(input int i);
    return (i == 0) ? exp_q : last_q;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Normal mode
    tclk = 1'b1;
    clk  = 1'b0;
    d    = 8'h5a;
    #500 clk = 1'b1;
    #100 check(8'h5a, "normal first capture");
    exp_q = 8'h5a;
    for (int i = 0; i < 40; i++) begin
      #400 clk = 1'b0;
      d = W'($urandom);
      #500;
      check(exp_q, "normal hold while CLK low");
      exp_q = d;
      clk = 1'b1;
      #1;
      check(exp_q, "normal capture");
      d = W'($urandom);           // change while CLK high must not pass
      #100 check(exp_q, "normal hold while CLK high");
    end
    // Test mode: TCLK high pulse of width td1; CLK low pulse of the same
    // width starting 300 ps after the TCLK rising edge.
    clk  = 1'b1;
    tclk = 1'b0;
    for (int i = 0; i < 48; i++) begin
      realtime td1, toff;
      logic [W-1:0] nv;
      td1  = 275.0 + 50.0 * (i % 16);
      toff = 2000.0 + 1000.0 * (i % 5);
      nv   = W'($urandom);
      #(toff);
      check(cap_prev(i), "test: Q holds until TCLK");
      fork
        begin
          tclk = 1'b1;
          #1 check(exp_q, "test: launch on TCLK rise");
          #(td1 - 1.0) tclk = 1'b0;
        end
        begin
          #300.0 clk = 1'b0;
          d = W'($urandom);
          #1 check(exp_q, "test: slave closed while CLK low");
          #(td1 - 2.0) d = nv;
          #1 clk = 1'b1;
          d = W'($urandom);
          #1 check(exp_q, "test: Q unchanged at CLK rise");
        end
      join
      last_q = exp_q;
      exp_q  = nv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
