// conv_top: 32-bit convolution / deconvolution engine.
//
// Two datapaths stand side by side, each with its own ports:
//   * conv_core: pipelined linear and circular convolution of two L-sample
//     sequences (L = 4, 32-bit samples). Sixteen radix-256 Booth multipliers
//     with redundant binary partial product addition form all products in
//     parallel; a new pair of sequences can enter every clock and results
//     appear three clocks later.
//   * deconv_unit: sequential deconvolution, recovering f from y = f * g
//     and g with one radix-256 multiplier and a restoring divider.
// The convolution outputs have the same width as the deconvolution y
// inputs, so y_lin(0..L-1) can be fed straight back to recover f.
// Each datapath has its own is_signed input (1: two's complement samples,
// 0: unsigned). rst is synchronous and active high.
//
// Convolution and deconvolution on radix-256 Booth multipliers follow the
// published design; keeping the two datapaths independent is this
// implementation's choice.
module conv_top
  import r256_pkg::*;
#(
  parameter int unsigned N  = DATA_W,
  parameter int unsigned L  = SEQ_L,
  parameter int unsigned YW = 2 * N + $clog2(L) + 1
) (
  input  logic          clk,
  input  logic          rst,
  // Convolution
  input  logic          conv_valid_i,
  input  logic          conv_signed_i,
  input  logic [N-1:0]  conv_f_i [L],
  input  logic [N-1:0]  conv_g_i [L],
  output logic          conv_valid_o,
  output logic [YW-1:0] conv_y_lin_o  [2*L-1],
  output logic [YW-1:0] conv_y_circ_o [L],
  // Deconvolution
  input  logic          dec_start_i,
  input  logic          dec_signed_i,
  input  logic [YW-1:0] dec_y_i [L],
  input  logic [N-1:0]  dec_g_i [L],
  output logic          dec_busy_o,
  output logic          dec_done_o,
  output logic          dec_err_o,
  output logic [N-1:0]  dec_f_o [L]
);

  conv_core #(.N(N), .L(L), .YW(YW)) u_conv (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (conv_valid_i),
    .is_signed (conv_signed_i),
    .f         (conv_f_i),
    .g         (conv_g_i),
    .out_valid (conv_valid_o),
    .y_lin     (conv_y_lin_o),
    .y_circ    (conv_y_circ_o)
  );

  deconv_unit #(.N(N), .L(L), .YW(YW)) u_deconv (
    .clk       (clk),
    .rst       (rst),
    .start     (dec_start_i),
    .is_signed (dec_signed_i),
    .y         (dec_y_i),
    .g         (dec_g_i),
    .busy      (dec_busy_o),
    .done      (dec_done_o),
    .div_err   (dec_err_o),
    .f         (dec_f_o)
  );

endmodule
