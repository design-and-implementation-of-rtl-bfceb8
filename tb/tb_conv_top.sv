// tb_conv_top: end-to-end test of the convolution / deconvolution engine at
// its default size (4-sample sequences of 32-bit samples).
//
// Each round convolves f and g, checks the linear and circular results
// against a 128-bit model and the 3-clock latency, then feeds y(0..3) of
// the result and g back into the deconvolution datapath and checks that f
// is recovered. While the deconvolution runs, further sequences stream
// through the convolution pipeline on back-to-back clocks. The worked
// example f = {3,4,2,6}, g = {1,0,3,6} comes first. The test counts how
// often each mechanism occurred and fails if one never did: signed mode,
// unsigned mode, back-to-back pipelined inputs, a circular wrap-around that
// changes the result, a Booth digit of magnitude 8, negative Booth digits,
// deconvolution, both datapaths busy at once, and the g(0) = 0 error.
module tb_conv_top;
  import r256_pkg::*;
  localparam int unsigned N  = DATA_W;
  localparam int unsigned L  = SEQ_L;
  localparam int unsigned YW = 2 * N + $clog2(L) + 1;

  logic          clk = 1'b0;
  logic          rst;
  logic          conv_valid_i, conv_signed_i;
  logic [N-1:0]  conv_f_i [L];
  logic [N-1:0]  conv_g_i [L];
  logic          conv_valid_o;
  logic [YW-1:0] conv_y_lin_o  [2*L-1];
  logic [YW-1:0] conv_y_circ_o [L];
  logic          dec_start_i, dec_signed_i;
  logic [YW-1:0] dec_y_i [L];
  logic [N-1:0]  dec_g_i [L];
  logic          dec_busy_o, dec_done_o, dec_err_o;
  logic [N-1:0]  dec_f_o [L];

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef enum int {
    M_SIGNED, M_UNSIGNED, M_BACK_TO_BACK, M_CIRC_WRAP, M_DIGIT8, M_NEG_DIGIT,
    M_DECONV, M_OVERLAP, M_DIV_ERR, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"signed", "unsigned", "back_to_back", "circular_wrap",
                                 "booth_digit_8", "negative_digit", "deconvolution",
                                 "both_busy", "g0_zero_error"};

  conv_top dut (
    .clk(clk), .rst(rst),
    .conv_valid_i(conv_valid_i), .conv_signed_i(conv_signed_i),
    .conv_f_i(conv_f_i), .conv_g_i(conv_g_i),
    .conv_valid_o(conv_valid_o), .conv_y_lin_o(conv_y_lin_o), .conv_y_circ_o(conv_y_circ_o),
    .dec_start_i(dec_start_i), .dec_signed_i(dec_signed_i),
    .dec_y_i(dec_y_i), .dec_g_i(dec_g_i),
    .dec_busy_o(dec_busy_o), .dec_done_o(dec_done_o), .dec_err_o(dec_err_o),
    .dec_f_o(dec_f_o));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [YW-1:0] lin  [2*L-1];
    logic [YW-1:0] circ [L];
    int            due;
  } exp_t;
  exp_t q [$];
  logic [YW-1:0] round_circ [L];  // circular result of a round's first sequence

  function automatic logic signed [127:0] ext(input logic [N-1:0] v, input logic sg);
    return sg ? 128'(signed'(v)) : 128'(v);
  endfunction

  // Radix-16 Booth digits of a sample as the multiplier sees it.
  task automatic note_digits(input logic [N-1:0] v, input logic sg);
    logic [8*5:0] ax;
    int d;
    ax = {{(8*5-N){sg & v[N-1]}}, v, 1'b0};
    for (int j = 0; j < 10; j++) begin
      d = -8 * int'(ax[4*j+4]) + 4 * int'(ax[4*j+3]) + 2 * int'(ax[4*j+2]) + int'(ax[4*j+1]) + int'(ax[4*j]);
      if (d == 8 || d == -8) mech[M_DIGIT8]++;
      if (d < 0) mech[M_NEG_DIGIT]++;
    end
  endtask

  task automatic send(input logic [N-1:0] ff [L], input logic [N-1:0] gg [L], input logic sg);
    exp_t e;
    logic signed [127:0] acc;
    for (int n = 0; n < 2 * int'(L) - 1; n++) begin
      acc = 0;
      for (int k = 0; k < int'(L); k++)
        if (n - k >= 0 && n - k < int'(L)) acc += ext(ff[k], sg) * ext(gg[n-k], sg);
      e.lin[n] = YW'(acc);
    end
    for (int n = 0; n < int'(L); n++) begin
      acc = 0;
      for (int k = 0; k < int'(L); k++) acc += ext(ff[k], sg) * ext(gg[(n - k + L) % L], sg);
      e.circ[n] = YW'(acc);
      if (n < int'(L) - 1 && e.circ[n] != e.lin[n]) mech[M_CIRC_WRAP]++;
    end
    e.due = cycle + 3;
    q.push_back(e);
    for (int i = 0; i < int'(L); i++) note_digits(ff[i], sg);
    if (conv_valid_i) mech[M_BACK_TO_BACK]++;
    mech[sg ? M_SIGNED : M_UNSIGNED]++;
    conv_f_i = ff;
    conv_g_i = gg;
    conv_signed_i = sg;
    conv_valid_i = 1'b1;
    if (dec_busy_o) mech[M_OVERLAP]++;
    @(negedge clk);
  endtask

  task automatic idle(input int n);
    conv_valid_i = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (!rst && conv_valid_o) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected conv output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (e.lin != conv_y_lin_o || e.circ != conv_y_circ_o) begin
          failures++;
          if (failures < 10) $display("FAIL conv result at cycle %0d", cycle);
        end
        checks++;
        if (cycle != e.due) begin
          failures++;
          $display("FAIL conv latency at cycle %0d, due %0d", cycle, e.due);
        end
      end
    end
  end

  task automatic random_seq(output logic [N-1:0] ff [L], output logic [N-1:0] gg [L], input int t);
    for (int i = 0; i < int'(L); i++) begin
      ff[i] = (t % 3 == 0) ? N'($urandom % 2000) - 1000 : $urandom;
      gg[i] = (t % 3 == 0) ? N'($urandom % 2000) - 1000 : $urandom;
    end
    if (gg[0] == '0) gg[0] = 32'd7;
  endtask

  // Convolve, then deconvolve the result while the pipeline keeps streaming.
  task automatic round(input logic [N-1:0] ff [L], input logic [N-1:0] gg [L], input logic sg, input int t);
    logic [N-1:0] f2 [L];
    logic [N-1:0] g2 [L];
    int guard;
    send(ff, gg, sg);
    idle(4);
    for (int i = 0; i < int'(L); i++) dec_y_i[i] = conv_y_lin_o[i];
    round_circ = conv_y_circ_o;
    dec_g_i = gg;
    dec_signed_i = sg;
    conv_signed_i = !sg;  // the two datapaths' modes are independent
    dec_start_i = 1'b1;
    @(negedge clk);
    dec_start_i = 1'b0;
    for (int b = 0; b < 6; b++) begin
      random_seq(f2, g2, t + b);
      send(f2, g2, (t + b) % 2 == 0);
    end
    idle(1);
    guard = 0;
    while (!dec_done_o && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    checks++;
    mech[M_DECONV]++;
    if (dec_f_o != ff || dec_err_o) begin
      failures++;
      if (failures < 10) $display("FAIL deconvolution round %0d: f0=%h exp %h", t, dec_f_o[0], ff[0]);
    end
    idle(4);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ff [L];
    logic [N-1:0] gg [L];
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    rst = 1'b1;
    conv_valid_i = 1'b0;
    conv_signed_i = 1'b1;
    dec_start_i = 1'b0;
    dec_signed_i = 1'b1;
    for (int i = 0; i < int'(L); i++) begin
      conv_f_i[i] = '0;
      conv_g_i[i] = '0;
      dec_y_i[i] = '0;
      dec_g_i[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // Worked example.
    round('{32'd3, 32'd4, 32'd2, 32'd6}, '{32'd1, 32'd0, 32'd3, 32'd6}, 1'b1, 0);
    checks++;
    if (round_circ[0] != 33 || round_circ[1] != 34 || round_circ[2] != 47 || round_circ[3] != 36) begin
      failures++;
      $display("FAIL worked example circular result");
    end

    for (int t = 1; t <= 20; t++) begin
      random_seq(ff, gg, t);
      if (t == 5) ff = '{32'h8000_0000, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8888_8888};
      round(ff, gg, t % 2 == 0, t);
    end

    // Deconvolution with g(0) = 0.
    dec_g_i[0] = '0;
    dec_start_i = 1'b1;
    @(negedge clk);
    dec_start_i = 1'b0;
    checks++;
    if (dec_done_o && dec_err_o) mech[M_DIV_ERR]++;
    else begin
      failures++;
      $display("FAIL g(0) = 0 not flagged");
    end
    idle(5);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d convolution results never appeared", q.size());
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-15s happened %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
