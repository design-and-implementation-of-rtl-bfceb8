// r256_precomputer: the "pre computer" of the radix-256 Booth multiplier.
//
// From the multiplicand B it forms the eight fundamental digit-multiplied
// partial products (FDMPPs): +-1B, +-3B, +-5B and +-7B. Every other multiple
// of B that a radix-16 Booth digit can ask for (2B, 4B, 6B, 8B) is one of
// these shifted left, so the selector needs nothing else. The odd multiples
// are formed with shift-and-add (3B = 2B+B, 5B = 4B+B, 7B = 8B-B) and the
// negatives by two's complement.
//
// Interface: b is a BW-bit two's complement value (the multiplier extends a
// 32-bit operand by one sign or zero bit, so BW = 33). Each output is BW+3
// bits wide, enough for 7B and 8B. Purely combinational.
//
// The FDMPP set follows the published radix-256 scheme; the shift-and-add
// construction and the widths are this implementation's choice.
module r256_precomputer
  import r256_pkg::*;
#(
  parameter int unsigned BW = DATA_W + 1
) (
  input  logic [BW-1:0]   b,
  output logic [BW+2:0]   fdmpp [NUM_FDMPP]
);

  logic signed [BW+2:0] b1, b3, b5, b7;

  always_comb begin
    b1 = (BW+3)'(signed'(b));
    b3 = (b1 <<< 1) + b1;
    b5 = (b1 <<< 2) + b1;
    b7 = (b1 <<< 3) - b1;
    fdmpp[FDMPP_P1] = b1;
    fdmpp[FDMPP_N1] = -b1;
    fdmpp[FDMPP_P3] = b3;
    fdmpp[FDMPP_N3] = -b3;
    fdmpp[FDMPP_P5] = b5;
    fdmpp[FDMPP_N5] = -b5;
    fdmpp[FDMPP_P7] = b7;
    fdmpp[FDMPP_N7] = -b7;
  end

endmodule
