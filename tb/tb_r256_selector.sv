// tb_r256_selector: drives the selector with FDMPPs computed here and with
// random radix-16 Booth digits, and checks PP_i = (S_i + 16*T_i) * B * 256^i
// modulo 2^64. All 17 x 17 digit pairs are covered.
module tb_r256_selector;
  import r256_pkg::*;
  localparam int unsigned FW = 36;
  localparam int unsigned NG = 5;
  localparam int unsigned PW = 64;

  logic [FW-1:0] fdmpp  [NUM_FDMPP];
  booth_digit_t  sdigit [NG];
  booth_digit_t  tdigit [NG];
  logic [PW-1:0] pp     [NG];
  int checks = 0, failures = 0;

  r256_selector #(.FW(FW), .NG(NG), .PW(PW)) dut (
    .fdmpp(fdmpp), .sdigit(sdigit), .tdigit(tdigit), .pp(pp));

  function automatic booth_digit_t mk(input int v);
    booth_digit_t d;
    d.neg = v < 0;
    d.mag = 4'(v < 0 ? -v : v);
    return d;
  endfunction

  task automatic run(input longint bs, input int sv [NG], input int tv [NG]);
    longint mult [NUM_FDMPP] = '{1, -1, 3, -3, 5, -5, 7, -7};
    for (int i = 0; i < NUM_FDMPP; i++) fdmpp[i] = FW'(bs * mult[i]);
    for (int i = 0; i < int'(NG); i++) begin
      sdigit[i] = mk(sv[i]);
      tdigit[i] = mk(tv[i]);
    end
    #1;
    for (int i = 0; i < int'(NG); i++) begin
      logic [PW-1:0] expv;
      expv = PW'((longint'(sv[i]) + 16 * longint'(tv[i])) * bs) << (8 * i);
      checks++;
      if (pp[i] !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL B=%0d S=%0d T=%0d i=%0d got=%h exp=%h", bs, sv[i], tv[i], i, pp[i], expv);
      end
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
    int sv [NG];
    int tv [NG];
    longint bs;
    for (int s = -8; s <= 8; s++)
      for (int t = -8; t <= 8; t++) begin
        bs = longint'($signed(33'({$urandom, $urandom})));
        for (int i = 0; i < int'(NG); i++) begin
          sv[i] = (s + i) > 8 ? s + i - 17 : s + i;
          tv[i] = (t - i) < -8 ? t - i + 17 : t - i;
        end
        run(bs, sv, tv);
      end
    // Extreme multiplicands with the largest digits.
    for (int i = 0; i < int'(NG); i++) begin
      sv[i] = -8;
      tv[i] = -8;
    end
    run(-(longint'(1) <<< 32), sv, tv);
    run((longint'(1) <<< 32) - 1, sv, tv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
