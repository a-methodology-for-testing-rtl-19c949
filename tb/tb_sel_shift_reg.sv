// tb_sel_shift_reg: shifts random 4-bit words in MSB first, checks the
// parallel value after four enabled clocks, checks that a disabled clock
// holds the value and that reset clears it.
module tb_sel_shift_reg;
  timeunit 1ps;
  timeprecision 1fs;

  logic       sr_clk = 1'b0, sr_rst_n, sr_en, sr_in;
  logic [3:0] s, word;
  int checks = 0, failures = 0;

  sel_shift_reg dut (.sr_clk, .sr_rst_n, .sr_en, .sr_in, .s);

  always #500 sr_clk = !sr_clk;

  initial begin
    repeat (2000) @(posedge sr_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sr_rst_n = 1'b1;
    sr_en    = 1'b0;
    sr_in    = 1'b0;
    #10 sr_rst_n = 1'b0;     // an edge, whatever the power-up value
    #90;
    checks++;
    if (s !== 4'd0) begin failures++; $display("FAIL reset s=%h", s); end
    sr_rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      word = 4'($urandom);
      for (int b = 3; b >= 0; b--) begin
        @(negedge sr_clk);
        sr_en = 1'b1;
        sr_in = word[b];
      end
      @(negedge sr_clk);
      sr_en = 1'b0;
      sr_in = !sr_in;
      checks++;
      if (s !== word) begin failures++; $display("FAIL word=%h s=%h", word, s); end
      @(negedge sr_clk);
      checks++;
      if (s !== word) begin failures++; $display("FAIL hold word=%h s=%h", word, s); end
    end
    @(negedge sr_clk);
    sr_rst_n = 1'b0;
    #10;
    checks++;
    if (s !== 4'd0) begin failures++; $display("FAIL async reset s=%h", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
