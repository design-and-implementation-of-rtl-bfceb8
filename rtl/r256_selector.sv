// r256_selector: the selector of the radix-256 Booth multiplier.
//
// For every radix-256 group i it has two multiplexers. The S multiplexer
// turns Sdigit_i into SGDMPP_i = S_i * B and the T multiplexer turns Tdigit_i
// into TGDMPP_i = 16 * T_i * B; both pick one of the precomputed FDMPPs and
// shift it (2B = 1B<<1, 4B = 1B<<2, 6B = 3B<<1, 8B = 1B<<3, negatives from
// the negated FDMPPs). SGDMPP_i + TGDMPP_i is the digit-multiplied partial
// product D_i * B, which is sign-extended and shifted left by 8*i places into
// partial product PP_i. The PPs are plain two's complement (NB) numbers.
//
// Interface: fdmpp are the precomputer's outputs (FW = BW+3 bits); sdigit and
// tdigit come from the control signal generator; pp[i] is PW bits, the width
// of the final product (arithmetic is modulo 2^PW). Purely combinational.
//
// The mux-and-shift selection and the SGDMPP + TGDMPP addition follow the
// published scheme; the widths are chosen for 32-bit operands.
module r256_selector
  import r256_pkg::*;
#(
  parameter int unsigned FW = DATA_W + 4,
  parameter int unsigned NG = num_groups(DATA_W),
  parameter int unsigned PW = 2 * DATA_W
) (
  input  logic [FW-1:0]  fdmpp  [NUM_FDMPP],
  input  booth_digit_t   sdigit [NG],
  input  booth_digit_t   tdigit [NG],
  output logic [PW-1:0]  pp     [NG]
);

  // One extra bit so that 8 * (most negative B) cannot overflow.
  localparam int unsigned SW = FW + 1;

  function automatic logic signed [SW-1:0] pick(
      input booth_digit_t d, input logic [FW-1:0] fv [NUM_FDMPP]);
    logic signed [SW-1:0] p1, p3, p5, p7;
    p1 = SW'(signed'(fv[d.neg ? FDMPP_N1 : FDMPP_P1]));
    p3 = SW'(signed'(fv[d.neg ? FDMPP_N3 : FDMPP_P3]));
    p5 = SW'(signed'(fv[d.neg ? FDMPP_N5 : FDMPP_P5]));
    p7 = SW'(signed'(fv[d.neg ? FDMPP_N7 : FDMPP_P7]));
    unique case (d.mag)
      4'd1:    return p1;
      4'd2:    return p1 <<< 1;
      4'd3:    return p3;
      4'd4:    return p1 <<< 2;
      4'd5:    return p5;
      4'd6:    return p3 <<< 1;
      4'd7:    return p7;
      4'd8:    return p1 <<< 3;
      default: return '0;
    endcase
  endfunction

  logic signed [SW-1:0] sgdmpp [NG];
  logic signed [SW+4:0] tgdmpp [NG];
  logic signed [SW+5:0] dpp    [NG];

  always_comb begin
    for (int i = 0; i < NG; i++) begin
      sgdmpp[i] = pick(sdigit[i], fdmpp);
      tgdmpp[i] = (SW+5)'(pick(tdigit[i], fdmpp)) <<< 4;
      dpp[i]    = (SW+6)'(sgdmpp[i]) + (SW+6)'(tgdmpp[i]);
      pp[i]     = PW'(signed'(dpp[i])) << (8 * i);
    end
  end

endmodule
