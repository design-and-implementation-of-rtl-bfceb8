// rb_adder: carry-propagation-free adder for redundant binary (RB) numbers.
//
// Each RB digit z in {-1, 0, 1} is held as a pair of bits (z+, z-) with
// value z+ - z-, so (0,0) and (1,1) both mean 0. Addition works digit by
// digit in two steps that each look only at fixed neighbours, so the delay
// does not grow with the width:
//   1. For every position i, x_i + y_i = 2*c_i + s_i, where the choice of
//      intermediate carry c_i and sum s_i depends on whether digits x_(i-1)
//      and y_(i-1) are both non-negative:
//        x+y =  2            -> c= 1, s= 0
//        x+y =  1, low >= 0  -> c= 1, s=-1   otherwise c= 0, s= 1
//        x+y =  0            -> c= 0, s= 0
//        x+y = -1, low >= 0  -> c= 0, s=-1   otherwise c=-1, s= 1
//        x+y = -2            -> c=-1, s= 0
//   2. z_i = s_i + c_(i-1), which always lies in {-1, 0, 1}.
// Below digit 0 the "lower pair" counts as non-negative and c_-1 = 0. The
// carry out of the top digit is dropped: the result is the sum modulo 2^W.
//
// Interface: xp/xm and yp/ym are the positive and negative digit vectors of
// the two operands, zp/zm those of the sum. Purely combinational.
//
// Digit coding and carry/sum rules follow the published RB addition scheme;
// dropping the top carry is this implementation's choice.
module rb_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] xp,
  input  logic [W-1:0] xm,
  input  logic [W-1:0] yp,
  input  logic [W-1:0] ym,
  output logic [W-1:0] zp,
  output logic [W-1:0] zm
);

  // Intermediate carry and sum digits, same (+,-) coding.
  logic [W-1:0] cp, cm, sp, sm;
  // 1: both digits at this position are non-negative.
  logic [W-1:0] nonneg;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      nonneg[i] = !(xm[i] && !xp[i]) && !(ym[i] && !yp[i]);
    end
    for (int i = 0; i < W; i++) begin
      logic signed [2:0] t;
      logic low_nonneg;
      t = 3'(signed'({1'b0, xp[i]})) - 3'(signed'({1'b0, xm[i]}))
        + 3'(signed'({1'b0, yp[i]})) - 3'(signed'({1'b0, ym[i]}));
      low_nonneg = (i == 0) ? 1'b1 : nonneg[i-1];
      {cp[i], cm[i], sp[i], sm[i]} = 4'b0000;
      unique case (t)
        3'sd2:  cp[i] = 1'b1;
        3'sd1:  if (low_nonneg) {cp[i], sm[i]} = 2'b11; else sp[i] = 1'b1;
        -3'sd1: if (low_nonneg) sm[i] = 1'b1; else {cm[i], sp[i]} = 2'b11;
        -3'sd2: cm[i] = 1'b1;
        default: ;
      endcase
    end
    for (int i = 0; i < W; i++) begin
      logic signed [2:0] z;
      z = 3'(signed'({1'b0, sp[i]})) - 3'(signed'({1'b0, sm[i]}));
      if (i > 0) z = z + 3'(signed'({1'b0, cp[i-1]})) - 3'(signed'({1'b0, cm[i-1]}));
      zp[i] = (z == 3'sd1);
      zm[i] = (z == -3'sd1);
    end
  end

endmodule
