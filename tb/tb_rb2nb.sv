// tb_rb2nb: checks the RB to two's complement conversion nb = zp - zm for
// random and corner digit vectors.
module tb_rb2nb;
  localparam int unsigned W = 64;

  logic [W-1:0] zp, zm, nb;
  int checks = 0, failures = 0;

  rb2nb #(.W(W)) dut (.zp(zp), .zm(zm), .nb(nb));

  task automatic check_one(input logic [W-1:0] p, input logic [W-1:0] m);
    zp = p;
    zm = m;
    #1;
    checks++;
    if (nb !== p - m) begin
      failures++;
      if (failures < 10) $display("FAIL zp=%h zm=%h nb=%h", p, m, nb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0);
    check_one('0, 64'd1);
    check_one({64{1'b1}}, {64{1'b1}});
    check_one(64'h5, 64'h2);     // RB 1,0,1 minus 0,1,0 = 3
    for (int k = 0; k < 3000; k++) check_one({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
