// sel_shift_reg: serial loading of the delay selection S0-S3 through one pin.
//
// A SEL_W-bit shift register clocked by sr_clk: while sr_en is high each
// rising edge shifts sr_in in at the top, S3 first and S0 last, so after
// SEL_W enabled edges s holds the word sent most-significant-bit first.
// sr_rst_n (asynchronous, active low) clears it to setting 0, the shortest
// Td1. The enable, the bit order and the reset are this implementation's
// choices.
module sel_shift_reg
  import cdff_pkg::*;
(
  input  logic             sr_clk,
  input  logic             sr_rst_n,
  input  logic             sr_en,
  input  logic             sr_in,
  output logic [SEL_W-1:0] s
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge sr_clk or negedge sr_rst_n) begin
    if (!sr_rst_n)  s <= '0;
    else if (sr_en) s <= {s[SEL_W-2:0], sr_in};
  end
endmodule
