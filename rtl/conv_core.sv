// conv_core: pipelined linear and circular convolution of two L-sample
// sequences f(n) and g(n) of N-bit samples (default 4 samples of 32 bits).
//
// All L*L products f(k)*g(j) are formed at once by radix-256 Booth / RB
// multipliers (r256_mult). The linear convolution y(n) = sum_k f(k) g(n-k),
// n = 0..2L-2, adds the products on each anti-diagonal k + j = n. The
// circular convolution yc(n) = sum_k f(k) g((n-k) mod L), n = 0..L-1, adds
// the products with (k + j) mod L = n, which equals y(n) + y(n+L).
//
// Pipeline (three register stages, latency 3 clocks, one new pair of
// sequences accepted every clock):
//   stage 1  input registers for f, g, is_signed
//   stage 2  product registers at the multiplier outputs
//   stage 3  output registers for the sums
// out_valid rises three clocks after the in_valid it belongs to.
// Outputs are YW = 2N + clog2(L) + 1 bits so that sums of L (linear) or
// up to L (circular) full-width products never overflow. is_signed selects
// two's complement (1) or unsigned (0) samples. rst is synchronous, active
// high, and clears all pipeline registers.
//
// The convolution equations and the 4 x 32-bit default size follow the
// published design; the fully parallel product array, the placement of the
// pipeline registers, the 67-bit output width (64 bits in the original) and
// the valid strobes are this implementation's choices.
module conv_core
  import r256_pkg::*;
#(
  parameter int unsigned N  = DATA_W,
  parameter int unsigned L  = SEQ_L,
  parameter int unsigned YW = 2 * N + $clog2(L) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          is_signed,
  input  logic [N-1:0]  f [L],
  input  logic [N-1:0]  g [L],
  output logic          out_valid,
  output logic [YW-1:0] y_lin  [2*L-1],
  output logic [YW-1:0] y_circ [L]
);

  localparam int unsigned PW = 2 * N;

  // Stage 1: input registers.
  logic         s1_valid, s1_signed;
  logic [N-1:0] s1_f [L];
  logic [N-1:0] s1_g [L];

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid  <= 1'b0;
      s1_signed <= 1'b0;
      for (int i = 0; i < L; i++) begin
        s1_f[i] <= '0;
        s1_g[i] <= '0;
      end
    end else begin
      s1_valid  <= in_valid;
      s1_signed <= is_signed;
      s1_f      <= f;
      s1_g      <= g;
    end
  end

  // L x L multiplier array.
  logic [PW-1:0] prod [L][L];

  for (genvar k = 0; k < L; k++) begin : g_row
    for (genvar j = 0; j < L; j++) begin : g_col
      r256_mult #(.N(N), .PW(PW)) u_mult (
        .a         (s1_f[k]),
        .b         (s1_g[j]),
        .is_signed (s1_signed),
        .p         (prod[k][j])
      );
    end
  end

  // Stage 2: product registers.
  logic          s2_valid, s2_signed;
  logic [PW-1:0] s2_prod [L][L];

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid  <= 1'b0;
      s2_signed <= 1'b0;
      for (int k = 0; k < L; k++)
        for (int j = 0; j < L; j++)
          s2_prod[k][j] <= '0;
    end else begin
      s2_valid  <= s1_valid;
      s2_signed <= s1_signed;
      s2_prod   <= prod;
    end
  end

  // Sums of the products on each diagonal.
  logic [YW-1:0] lin_sum  [2*L-1];
  logic [YW-1:0] circ_sum [L];

  always_comb begin
    for (int n = 0; n < 2 * L - 1; n++) lin_sum[n] = '0;
    for (int n = 0; n < L; n++)         circ_sum[n] = '0;
    for (int k = 0; k < L; k++) begin
      for (int j = 0; j < L; j++) begin
        logic [YW-1:0] ext;
        ext = {{(YW-PW){s2_signed & s2_prod[k][j][PW-1]}}, s2_prod[k][j]};
        lin_sum[k+j]        = lin_sum[k+j] + ext;
        circ_sum[(k+j) % L] = circ_sum[(k+j) % L] + ext;
      end
    end
  end

  // Stage 3: output registers.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int n = 0; n < 2 * L - 1; n++) y_lin[n] <= '0;
      for (int n = 0; n < L; n++)         y_circ[n] <= '0;
    end else begin
      out_valid <= s2_valid;
      y_lin     <= lin_sum;
      y_circ    <= circ_sum;
    end
  end

endmodule
