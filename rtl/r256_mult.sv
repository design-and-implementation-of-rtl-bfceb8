// r256_mult: N x N multiplier built from radix-256 Booth encoding and
// redundant binary (RB) addition.
//
// Datapath (all combinational):
//   1. Both operands are extended by one bit: a copy of the top bit when
//      is_signed is 1, a zero otherwise. This lets the same signed Booth
//      datapath serve signed and unsigned operands.
//   2. The precomputer forms +-1B, +-3B, +-5B, +-7B.
//   3. The control signal generator cuts A into radix-256 digits, each held
//      as an S and a T radix-16 Booth digit (for N = 32: five groups; the top
//      one is zero for signed operands, so signed products use four PPs).
//   4. The selector turns each digit into a partial product PP_i = D_i*B*256^i.
//   5. Pairs of NB partial products become one RB number each with the
//      identity x + y = x - ~y - 1: the positive digits are x, the negative
//      digits are ~y, so each pair is worth x + y + 1. The last RB operand
//      holds the left-over odd PP (or zero) as positive digits and the pair
//      count as negative digits, which cancels those surplus ones.
//   6. A chain of RB adders sums the RB operands without carry propagation.
//   7. rb2nb converts the RB sum to the two's complement product.
// The product is exact in PW = 2N bits for both signed and unsigned operands.
//
// Interface: a (multiplier), b (multiplicand), is_signed; p = a * b. No clock.
//
// Stages 2-7 follow the published radix-256 / RB multiplier. The one-bit
// operand extension for unsigned mode, the correction operand of step 5 and
// the chained (rather than tree) RB adders are this implementation's choices.
module r256_mult
  import r256_pkg::*;
#(
  parameter int unsigned N  = DATA_W,
  parameter int unsigned PW = 2 * N
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          is_signed,
  output logic [PW-1:0] p
);

  localparam int unsigned EW     = N + 1;          // extended operand width
  localparam int unsigned FW     = EW + 3;         // FDMPP width
  localparam int unsigned NG     = num_groups(N);  // radix-256 groups
  localparam int unsigned NPAIRS = NG / 2;
  localparam int unsigned NR     = NPAIRS + 1;     // RB operands

  logic [EW-1:0] a_ext, b_ext;
  assign a_ext = {is_signed & a[N-1], a};
  assign b_ext = {is_signed & b[N-1], b};

  logic [FW-1:0] fdmpp  [NUM_FDMPP];
  booth_digit_t  sdigit [NG];
  booth_digit_t  tdigit [NG];
  logic [PW-1:0] pp     [NG];

  r256_precomputer #(.BW(EW)) u_pre (
    .b     (b_ext),
    .fdmpp (fdmpp)
  );

  r256_ctrl_gen #(.AW(EW), .NG(NG)) u_ctrl (
    .a      (a_ext),
    .sdigit (sdigit),
    .tdigit (tdigit)
  );

  r256_selector #(.FW(FW), .NG(NG), .PW(PW)) u_sel (
    .fdmpp  (fdmpp),
    .sdigit (sdigit),
    .tdigit (tdigit),
    .pp     (pp)
  );

  // NB -> RB encoding of the partial products.
  logic [PW-1:0] rp [NR];
  logic [PW-1:0] rm [NR];

  always_comb begin
    for (int j = 0; j < NPAIRS; j++) begin
      rp[j] = pp[2*j];
      rm[j] = ~pp[2*j+1];
    end
    rp[NR-1] = (NG % 2 == 1) ? pp[NG-1] : '0;
    rm[NR-1] = PW'(NPAIRS);
  end

  // Chain of RB adders.
  logic [PW-1:0] accp [NR];
  logic [PW-1:0] accm [NR];

  assign accp[0] = rp[0];
  assign accm[0] = rm[0];

  for (genvar k = 1; k < NR; k++) begin : g_rb
    rb_adder #(.W(PW)) u_rb (
      .xp (accp[k-1]),
      .xm (accm[k-1]),
      .yp (rp[k]),
      .ym (rm[k]),
      .zp (accp[k]),
      .zm (accm[k])
    );
  end

  rb2nb #(.W(PW)) u_conv (
    .zp (accp[NR-1]),
    .zm (accm[NR-1]),
    .nb (p)
  );

endmodule
