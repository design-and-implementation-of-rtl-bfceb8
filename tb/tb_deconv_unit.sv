// tb_deconv_unit: builds y = f * g here for random f and g (signed and
// unsigned, g(0) != 0), runs the deconvolution and checks that f comes
// back exactly. Also checks the worked example (y = {3,4,11,36}, g =
// {1,0,3,6} gives f = {3,4,2,6}), the g(0) = 0 error path, and the run time:
// done must rise sum over n = 0..L-1 of (n + YW + 4) clocks after the
// clock edge that samples start.
module tb_deconv_unit;
  import r256_pkg::*;
  localparam int unsigned N  = 32;
  localparam int unsigned L  = 4;
  localparam int unsigned YW = 2 * N + $clog2(L) + 1;

  logic          clk = 1'b0;
  logic          rst, start, is_signed;
  logic [YW-1:0] y [L];
  logic [N-1:0]  g [L];
  logic          busy, done, div_err;
  logic [N-1:0]  f [L];
  int checks = 0, failures = 0;

  deconv_unit #(.N(N), .L(L)) dut (
    .clk(clk), .rst(rst), .start(start), .is_signed(is_signed), .y(y), .g(g),
    .busy(busy), .done(done), .div_err(div_err), .f(f));

  always #5 clk = ~clk;

  function automatic logic signed [127:0] ext(input logic [N-1:0] v, input logic sg);
    return sg ? 128'(signed'(v)) : 128'(v);
  endfunction

  function automatic int expected_cycles();
    int c = 0;
    for (int n = 0; n < int'(L); n++) c += n + int'(YW) + 4;
    return c;
  endfunction

  task automatic run(input logic [N-1:0] ff [L], input logic [N-1:0] gg [L], input logic sg);
    logic signed [127:0] acc;
    int cyc;
    for (int n = 0; n < int'(L); n++) begin
      acc = 0;
      for (int k = 0; k <= n; k++) acc += ext(ff[k], sg) * ext(gg[n-k], sg);
      y[n] = YW'(acc);
    end
    g = gg;
    is_signed = sg;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;  // clocks after the edge that sampled start
    while (!done && cyc < 2000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (f != ff || div_err) begin
      failures++;
      if (failures < 10) $display("FAIL f0=%h exp %h f3=%h exp %h err=%0d", f[0], ff[0], f[3], ff[3], div_err);
    end
    checks++;
    if (cyc != expected_cycles()) begin
      failures++;
      $display("FAIL took %0d cycles, expected %0d", cyc, expected_cycles());
    end
    @(negedge clk);
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ff [L];
    logic [N-1:0] gg [L];
    rst = 1'b1;
    start = 1'b0;
    is_signed = 1'b1;
    for (int i = 0; i < int'(L); i++) begin
      y[i] = '0;
      g[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run('{32'd3, 32'd4, 32'd2, 32'd6}, '{32'd1, 32'd0, 32'd3, 32'd6}, 1'b1);
    checks++;
    if (y[3] != 36) begin
      failures++;
      $display("FAIL worked example y(3)");
    end
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < int'(L); i++) begin
        ff[i] = (t % 4 == 0) ? $urandom % 200 - 100 : $urandom;
        gg[i] = (t % 4 == 0) ? $urandom % 200 - 100 : $urandom;
      end
      if (gg[0] == 0) gg[0] = 32'h8000_0000;
      run(ff, gg, t[0]);
    end
    // g(0) = 0: error reported on the next clock.
    g[0] = '0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!done || !div_err || busy) begin
      failures++;
      $display("FAIL g(0)=0 not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
