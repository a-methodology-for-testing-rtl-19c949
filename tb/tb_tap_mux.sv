// tb_tap_mux: random tap patterns under each one-hot select; both outputs
// must equal the selected bit of their own input vector.
module tb_tap_mux;
  timeunit 1ps;
  timeprecision 1fs;

  logic [15:0] d_in, dd_in, sel_oh;
  logic        d_out, dd_out;
  int checks = 0, failures = 0;

  tap_mux dut (.d_in, .dd_in, .sel_oh, .d_out, .dd_out);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_oh = 16'd1;
    d_in   = '0;
    dd_in  = '0;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 16; k++) begin
        d_in   = 16'($urandom);
        dd_in  = 16'($urandom);
        sel_oh = 16'd1 << k;
        #10;
        checks++;
        if (d_out !== d_in[k] || dd_out !== dd_in[k]) begin
          failures++;
          $display("FAIL k=%0d d_in=%h dd_in=%h -> %b %b", k, d_in, dd_in, d_out, dd_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
