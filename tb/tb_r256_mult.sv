// tb_r256_mult: self-checking testbench for the radix-256 Booth / RB
// multiplier. Compares a*b with the simulator's own 64-bit signed or
// unsigned multiplication for corner values and random operands, in both
// signed and unsigned mode.
module tb_r256_mult;
  localparam int unsigned N = 32;

  logic [N-1:0]   a, b;
  logic           is_signed;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  r256_mult #(.N(N)) dut (.a(a), .b(b), .is_signed(is_signed), .p(p));

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic sg);
    logic [2*N-1:0] expv;
    a = ta; b = tb_; is_signed = sg;
    #1;
    if (sg) expv = 64'($signed({{32{ta[N-1]}}, ta}) * $signed({{32{tb_[N-1]}}, tb_}));
    else    expv = {32'b0, ta} * {32'b0, tb_};
    checks++;
    if (p !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h signed=%0d p=%h exp=%h", ta, tb_, sg, p, expv);
    end
  endtask

  logic [N-1:0] corners [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                32'h7FFF_FFFF, 32'h8080_8080, 32'h7F7F_7F7F, 32'h0000_0003};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example 1 operands from the convolution example.
    check_one(32'd3, 32'd6, 1'b1);
    check_one(32'd6, 32'd6, 1'b0);
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          check_one(corners[i], corners[j], s[0]);
    for (int k = 0; k < 4000; k++)
      check_one($urandom, $urandom, k[0]);
    // Every radix-16 digit value in every position.
    for (int k = 0; k < 512; k++)
      check_one({4{k[7:0]}} ^ {k[8], 31'b0}, $urandom, k[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
