// decoder_4x16: binary-to-one-hot decoder for the delay selection inputs
// S0-S3.
//
// sel_oh[k] is 1 exactly when s == k. Purely combinational; its speed does
// not matter because the select inputs are static during a test. S0 is taken
// as the least significant bit.
module decoder_4x16 #(
  parameter int SEL_W = cdff_pkg::SEL_W
) (
  input  logic [SEL_W-1:0]      s,
  output logic [(1<<SEL_W)-1:0] sel_oh
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    sel_oh    = '0;
    sel_oh[s] = 1'b1;
  end
endmodule
