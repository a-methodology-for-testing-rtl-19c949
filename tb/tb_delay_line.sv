// tb_delay_line: sends falling and rising edges into the default 26-element
// line at full bias and checks that every tap i sees the falling edge
// i*50 ps and the rising edge i*30 ps after the input.
module tb_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 26;
  logic          in;
  real           vp, vn;
  logic [N:0]    taps;
  realtime       tf [N+1];
  realtime       tr [N+1];
  realtime       t0;
  int checks = 0, failures = 0;

  delay_line dut (.in, .vp, .vn, .taps);

  for (genvar i = 0; i <= N; i++) begin : g_mon
    always @(negedge taps[i]) tf[i] = $realtime;
    always @(posedge taps[i]) tr[i] = $realtime;
  end

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
    in = 1'b1;
    #100 in = 1'b0;
    #100 in = 1'b1;
    #3000;
    for (int r = 0; r < 3; r++) begin
      t0 = $realtime;
      in = 1'b0;
      #3000;
      for (int i = 1; i <= N; i++) begin
        checks++;
        if (tf[i] - t0 < 50.0 * i - 0.01 || tf[i] - t0 > 50.0 * i + 0.01) begin
          failures++;
          $display("FAIL tap %0d fall delay %0.3f", i, tf[i] - t0);
        end
      end
      t0 = $realtime;
      in = 1'b1;
      #3000;
      for (int i = 1; i <= N; i++) begin
        checks++;
        if (tr[i] - t0 < 30.0 * i - 0.01 || tr[i] - t0 > 30.0 * i + 0.01) begin
          failures++;
          $display("FAIL tap %0d rise delay %0.3f", i, tr[i] - t0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
