// deconv_unit: sequential deconvolution. Given y = f * g (linear
// convolution) and g, it recovers the L samples of f with the recursion
//   f(0) = y(0) / g(0)
//   f(n) = ( y(n) - sum_{k=0}^{n-1} f(k) g(n-k) ) / g(0),   n = 1..L-1
// which holds for causal sequences with g(0) != 0.
//
// One radix-256 Booth / RB multiplier (r256_mult) forms one product f(k)
// g(n-k) per clock, which is subtracted from an accumulator loaded with
// y(n); then a restoring divider (seq_divider) divides the accumulator by
// g(0). Signed operands are divided as magnitudes and the quotient sign is
// fixed afterwards, so the quotient is truncated toward zero if y is not an
// exact convolution.
//
// Interface: pulse start with y(0..L-1), g(0..L-1) and is_signed valid on
// the same clock (they are captured). busy is high until done pulses; f is
// valid from done on. If g(0) = 0, done pulses on the next clock with
// div_err = 1 and f cleared. Timing per output sample n: n multiply clocks,
// one divider start clock, YW divider clocks and one clock to store the
// result. rst is synchronous and active high. With the defaults (L = 4,
// YW = 67) done rises 290 clocks after the edge that samples start.
//
// The recursion follows the published description; the sequential schedule
// and the restoring divider are this implementation's choices (the original
// does not give its divider).
module deconv_unit
  import r256_pkg::*;
#(
  parameter int unsigned N  = DATA_W,
  parameter int unsigned L  = SEQ_L,
  parameter int unsigned YW = 2 * N + $clog2(L) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          is_signed,
  input  logic [YW-1:0] y [L],
  input  logic [N-1:0]  g [L],
  output logic          busy,
  output logic          done,
  output logic          div_err,
  output logic [N-1:0]  f [L]
);

  localparam int unsigned PW = 2 * N;
  localparam int unsigned IW = (L > 1) ? $clog2(L) : 1;  // sample index

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_MAC,
    ST_DIV_START,
    ST_DIV_WAIT,
    ST_STORE
  } state_e;

  state_e        state;
  logic          sgn_q;
  logic [YW-1:0] y_q [L];
  logic [N-1:0]  g_q [L];
  logic [IW-1:0] n_q, k_q;
  logic [YW-1:0] acc_q;

  // Multiplier: f(k) * g(n-k).
  logic [N-1:0]  mul_a, mul_b;
  logic [PW-1:0] mul_p;
  logic [YW-1:0] mul_ext;

  always_comb begin
    mul_a   = f[k_q];
    mul_b   = g_q[IW'(n_q - k_q)];
    mul_ext = {{(YW-PW){sgn_q & mul_p[PW-1]}}, mul_p};
  end

  r256_mult #(.N(N), .PW(PW)) u_mult (
    .a         (mul_a),
    .b         (mul_b),
    .is_signed (sgn_q),
    .p         (mul_p)
  );

  // Divider on magnitudes.
  logic          num_neg, den_neg;
  logic [YW-1:0] num_mag;
  logic [N-1:0]  den_mag;
  logic          div_done;
  logic [YW-1:0] div_q;
  logic          q_neg_q;

  always_comb begin
    num_neg = sgn_q & acc_q[YW-1];
    den_neg = sgn_q & g_q[0][N-1];
    num_mag = num_neg ? -acc_q : acc_q;
    den_mag = den_neg ? -g_q[0] : g_q[0];
  end

  seq_divider #(.NW(YW), .DW(N)) u_div (
    .clk       (clk),
    .rst       (rst),
    .start     (state == ST_DIV_START),
    .num       (num_mag),
    .den       (den_mag),
    .busy      (),
    .done      (div_done),
    .quotient  (div_q),
    .remainder ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
      div_err <= 1'b0;
      sgn_q   <= 1'b0;
      n_q     <= '0;
      k_q     <= '0;
      acc_q   <= '0;
      q_neg_q <= 1'b0;
      for (int i = 0; i < L; i++) begin
        y_q[i] <= '0;
        g_q[i] <= '0;
        f[i]   <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            y_q     <= y;
            g_q     <= g;
            sgn_q   <= is_signed;
            n_q     <= '0;
            k_q     <= '0;
            acc_q   <= y[0];
            div_err <= 1'b0;
            for (int i = 0; i < L; i++) f[i] <= '0;
            if (g[0] == '0) begin
              div_err <= 1'b1;
              done    <= 1'b1;
            end else begin
              busy  <= 1'b1;
              state <= ST_MAC;
            end
          end
        end
        ST_MAC: begin
          if (k_q < n_q) begin
            acc_q <= acc_q - mul_ext;
            k_q   <= k_q + 1'b1;
          end else begin
            state <= ST_DIV_START;
          end
        end
        ST_DIV_START: begin
          q_neg_q <= num_neg ^ den_neg;
          state   <= ST_DIV_WAIT;
        end
        ST_DIV_WAIT: begin
          if (div_done) state <= ST_STORE;
        end
        ST_STORE: begin
          f[n_q] <= q_neg_q ? -div_q[N-1:0] : div_q[N-1:0];
          if (n_q == IW'(L - 1)) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= ST_IDLE;
          end else begin
            n_q   <= n_q + 1'b1;
            k_q   <= '0;
            acc_q <= y_q[IW'(n_q + 1'b1)];
            state <= ST_MAC;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Handshake rules: the unit is busy whenever it is not idle, and done
  // marks the end of an operation, never a clock that is still busy.
  a_busy_when_active: assert property (@(posedge clk) disable iff (rst)
    (state != ST_IDLE) |-> busy);
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst)
    done |-> !busy);

endmodule
