// tb_decoder_4x16: drives all 16 select codes and checks that exactly bit k
// of the decoder output is set for code k.
module tb_decoder_4x16;
  timeunit 1ps;
  timeprecision 1fs;

  logic [3:0]  s;
  logic [15:0] sel_oh;
  int checks = 0, failures = 0;

  decoder_4x16 dut (.s(s), .sel_oh(sel_oh));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      s = 4'(k);
      #10;
      checks++;
      if (sel_oh != (16'd1 << k)) begin
        failures++;
        $display("FAIL s=%0d sel_oh=%h", k, sel_oh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
