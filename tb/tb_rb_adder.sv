// tb_rb_adder: adds random redundant binary numbers (each digit any of the
// four (+,-) codes) and checks that the value of the sum, zp - zm, equals
// (xp - xm) + (yp - ym) modulo 2^64, and that no sum digit is coded (1,1).
// Also walks every digit-pair combination at one position with every
// combination of the position below.
module tb_rb_adder;
  localparam int unsigned W = 64;

  logic [W-1:0] xp, xm, yp, ym, zp, zm;
  int checks = 0, failures = 0;

  rb_adder #(.W(W)) dut (.xp(xp), .xm(xm), .yp(yp), .ym(ym), .zp(zp), .zm(zm));

  task automatic check_now();
    logic [W-1:0] expv;
    #1;
    expv = (xp - xm) + (yp - ym);
    checks++;
    if ((zp - zm) !== expv || (zp & zm) != '0) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h/%h y=%h/%h z=%h/%h exp=%h", xp, xm, yp, ym, zp, zm, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      xp = '0; xm = '0; yp = '0; ym = '0;
      {xp[5], xm[5], yp[5], ym[5], xp[4], xm[4], yp[4], ym[4]} = 8'(c);
      check_now();
    end
    for (int k = 0; k < 5000; k++) begin
      xp = {$urandom, $urandom};
      xm = {$urandom, $urandom};
      yp = {$urandom, $urandom};
      ym = {$urandom, $urandom};
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
