// r256_pkg: types and constants shared by the radix-256 Booth multiplier and
// the convolution engine built on it.
//
// A radix-256 Booth digit D (range -128..128) is carried as two radix-16
// Booth digits, S (low, -8..8) and T (high, -8..8), with D = S + 16*T. Each
// radix-16 digit is sign and magnitude: magnitude 0..8 selects one of the
// precomputed odd multiples (1B, 3B, 5B, 7B) and a left shift, and the sign
// selects the negated copy. The FDMPP_* constants index the precomputer's
// output array.
package r256_pkg;

  // Default operand width: 32-bit samples.
  localparam int unsigned DATA_W = 32;
  // Default sequence length: 4 samples per sequence.
  localparam int unsigned SEQ_L  = 4;

  // One radix-16 Booth digit, sign and magnitude.
  typedef struct packed {
    logic       neg;   // 1: digit is negative
    logic [3:0] mag;   // 0..8
  } booth_digit_t;

  // Index of each fundamental digit-multiplied partial product.
  typedef enum logic [2:0] {
    FDMPP_P1 = 3'd0,  // +1B
    FDMPP_N1 = 3'd1,  // -1B
    FDMPP_P3 = 3'd2,  // +3B
    FDMPP_N3 = 3'd3,  // -3B
    FDMPP_P5 = 3'd4,  // +5B
    FDMPP_N5 = 3'd5,  // -5B
    FDMPP_P7 = 3'd6,  // +7B
    FDMPP_N7 = 3'd7   // -7B
  } fdmpp_idx_e;

  localparam int unsigned NUM_FDMPP = 8;

  // Number of radix-256 digit groups needed for an N-bit operand that has
  // been extended by one bit (so that unsigned operands stay positive).
  function automatic int unsigned num_groups(input int unsigned n);
    return (n + 1 + 7) / 8;
  endfunction

  // Decode a 5-bit window w[4:0] = {a_(j+3), a_(j+2), a_(j+1), a_j, a_(j-1)}
  // into a radix-16 Booth digit: -8*w4 + 4*w3 + 2*w2 + w1 + w0.
  function automatic booth_digit_t booth16(input logic [4:0] w);
    booth_digit_t d;
    int v;
    v = -8 * int'(w[4]) + 4 * int'(w[3]) + 2 * int'(w[2]) + int'(w[1]) + int'(w[0]);
    d.neg = (v < 0);
    d.mag = (v < 0) ? 4'(-v) : 4'(v);
    return d;
  endfunction

endpackage
