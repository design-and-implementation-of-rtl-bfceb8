// tb_conv_core: checks linear and circular convolution of 4-sample 32-bit
// sequences against sums of products worked out here in 128-bit
// arithmetic. Starts with the worked example f = {3,4,2,6}, g = {1,0,3,6}
// (linear result {3,4,11,36,30,30,36}, circular result {33,34,47,36}),
// then streams random signed and unsigned sequences, some on back-to-back
// clocks. Each result must appear exactly 3 clocks after its input.
module tb_conv_core;
  import r256_pkg::*;
  localparam int unsigned N  = 32;
  localparam int unsigned L  = 4;
  localparam int unsigned YW = 2 * N + $clog2(L) + 1;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid, is_signed;
  logic [N-1:0]  f [L];
  logic [N-1:0]  g [L];
  logic          out_valid;
  logic [YW-1:0] y_lin  [2*L-1];
  logic [YW-1:0] y_circ [L];
  int checks = 0, failures = 0;
  int cycle = 0;

  conv_core #(.N(N), .L(L)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .is_signed(is_signed),
    .f(f), .g(g), .out_valid(out_valid), .y_lin(y_lin), .y_circ(y_circ));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [YW-1:0] lin  [2*L-1];
    logic [YW-1:0] circ [L];
    int            due;
  } exp_t;
  exp_t q [$];

  function automatic logic signed [127:0] ext(input logic [N-1:0] v, input logic sg);
    return sg ? 128'(signed'(v)) : 128'(v);
  endfunction

  task automatic push_expect(input logic [N-1:0] ff [L], input logic [N-1:0] gg [L], input logic sg);
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
    end
    e.due = cycle + 3;
    q.push_back(e);
  endtask

  // Compare every output against the oldest expectation.
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (e.lin != y_lin || e.circ != y_circ) begin
          failures++;
          if (failures < 10) $display("FAIL result mismatch at cycle %0d: y0=%h exp %h", cycle, y_lin[0], e.lin[0]);
        end
        checks++;
        if (cycle != e.due) begin
          failures++;
          $display("FAIL latency: output at cycle %0d, due %0d", cycle, e.due);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    in_valid = 1'b0;
    is_signed = 1'b1;
    for (int i = 0; i < int'(L); i++) begin
      f[i] = '0;
      g[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // Worked example, also checked against literal values.
    f = '{32'd3, 32'd4, 32'd2, 32'd6};
    g = '{32'd1, 32'd0, 32'd3, 32'd6};
    in_valid = 1'b1;
    push_expect(f, g, 1'b1);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (y_lin[0] != 3 || y_lin[1] != 4 || y_lin[2] != 11 || y_lin[3] != 36 || y_lin[4] != 30 ||
        y_lin[5] != 30 || y_lin[6] != 36 || y_circ[0] != 33 || y_circ[1] != 34 ||
        y_circ[2] != 47 || y_circ[3] != 36) begin
      failures++;
      $display("FAIL worked example");
    end
    // Random streams.
    for (int t = 0; t < 300; t++) begin
      in_valid  = ($urandom % 4) != 0;
      is_signed = $urandom % 2;
      for (int i = 0; i < int'(L); i++) begin
        f[i] = (t % 5 == 0) ? {$urandom % 2 == 0, 31'h7FFF_FFFF} : $urandom;
        g[i] = (t % 7 == 0) ? 32'h8000_0000 : $urandom;
      end
      if (in_valid) push_expect(f, g, is_signed);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
