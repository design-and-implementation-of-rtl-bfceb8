// rb2nb: converts a redundant binary number to natural binary (two's
// complement).
//
// The RB number is split into its positive digit vector zp and negative
// digit vector zm; its value is zp - zm, formed as zp plus the two's
// complement of zm (zp + ~zm + 1). This is the one carry-propagating adder
// of the multiplier. Result is modulo 2^W. Purely combinational.
// The conversion method follows the published scheme.
module rb2nb #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] zp,
  input  logic [W-1:0] zm,
  output logic [W-1:0] nb
);

  always_comb nb = zp + ~zm + W'(1);

endmodule
