// r256_ctrl_gen: the control signal generator of the radix-256 Booth
// multiplier.
//
// The multiplier A (already extended to AW bits by one sign or zero bit) gets
// a zero appended on the right (a_-1 = 0) and is cut into overlapping 9-bit
// groups D_i = {a_(8i+7) .. a_(8i-1)}, one per radix-256 digit. Each group is
// split into two overlapping 5-bit windows: the S window {a_(8i+3)..a_(8i-1)}
// and the T window {a_(8i+7)..a_(8i+3)}. Each window is decoded as a radix-16
// Booth digit (-8..8), giving
//   D_i = S_i + 16*T_i,  A = sum_i D_i * 256^i.
// The S and T digits are the Sdigit/Tdigit select signals of the selector.
// Groups above the top of A read copies of A's top bit (sign extension).
//
// Interface: a is AW bits; sdigit[i] and tdigit[i] for i = 0..NG-1 are
// sign-magnitude booth_digit_t values. Purely combinational.
//
// The 9-bit overlapping groups and the S/T split follow the published
// scheme. The 5-bit sign/magnitude coding of each digit, and the fifth
// group that lets unsigned 32-bit operands share the signed datapath, are
// this implementation's choices.
module r256_ctrl_gen
  import r256_pkg::*;
#(
  parameter int unsigned AW = DATA_W + 1,
  parameter int unsigned NG = (AW + 7) / 8
) (
  input  logic [AW-1:0]  a,
  output booth_digit_t   sdigit [NG],
  output booth_digit_t   tdigit [NG]
);

  // a with a_-1 = 0 appended and sign-extended to 8*NG+1 bits.
  logic [8*NG:0] ax;

  always_comb begin
    ax = {{(8*NG+1-AW-1){a[AW-1]}}, a, 1'b0};
    for (int i = 0; i < NG; i++) begin
      sdigit[i] = booth16(ax[8*i   +: 5]);
      tdigit[i] = booth16(ax[8*i+4 +: 5]);
    end
  end

endmodule
