// mul1: signed amplitude multiplier.
//
// Multiplies the signed sine sample `dataa` by the signed amplitude word
// `datab` and gives the full-width signed product. With both operands in
// Q1.15 format (0x7FFF close to +1.0), result[30:15] is the scaled sample
// in Q1.15. Purely combinational, with no clock, as the generator's
// schematic draws it.
module mul1 #(
  parameter int unsigned AW = 16,
  parameter int unsigned BW = 16
) (
  input  logic signed [AW-1:0]    dataa,
  input  logic signed [BW-1:0]    datab,
  output logic signed [AW+BW-1:0] result
);

  always_comb result = dataa * datab;

endmodule
