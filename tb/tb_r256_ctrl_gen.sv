// tb_r256_ctrl_gen: checks the Sdigit/Tdigit control signals. Each digit
// must lie in -8..8, must equal the radix-16 Booth value of its 5-bit
// window worked out here from the bits of A, and the digits must rebuild A:
// sum_i (S_i + 16*T_i) * 256^i = A.
module tb_r256_ctrl_gen;
  import r256_pkg::*;
  localparam int unsigned AW = 33;
  localparam int unsigned NG = 5;

  logic [AW-1:0] a;
  booth_digit_t  sdigit [NG];
  booth_digit_t  tdigit [NG];
  int checks = 0, failures = 0;

  r256_ctrl_gen #(.AW(AW), .NG(NG)) dut (.a(a), .sdigit(sdigit), .tdigit(tdigit));

  function automatic longint dval(input booth_digit_t d);
    return d.neg ? -longint'(d.mag) : longint'(d.mag);
  endfunction

  // Bit j of A with a_-1 = 0 and sign extension above the top.
  function automatic longint abit(input logic [AW-1:0] v, input int j);
    if (j < 0) return 0;
    if (j >= int'(AW)) return longint'(v[AW-1]);
    return longint'(v[j]);
  endfunction

  task automatic check_a(input logic [AW-1:0] v);
    longint sum, w, es, et;
    a = v;
    #1;
    sum = 0;
    w = 1;
    for (int i = 0; i < int'(NG); i++) begin
      es = -8 * abit(v, 8*i+3) + 4 * abit(v, 8*i+2) + 2 * abit(v, 8*i+1) + abit(v, 8*i) + abit(v, 8*i-1);
      et = -8 * abit(v, 8*i+7) + 4 * abit(v, 8*i+6) + 2 * abit(v, 8*i+5) + abit(v, 8*i+4) + abit(v, 8*i+3);
      checks++;
      if (dval(sdigit[i]) != es || dval(tdigit[i]) != et || sdigit[i].mag > 8 || tdigit[i].mag > 8) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h group %0d S=%0d/%0d T=%0d/%0d", v, i, dval(sdigit[i]), es, dval(tdigit[i]), et);
      end
      sum += (dval(sdigit[i]) + 16 * dval(tdigit[i])) * w;
      w = w * 256;
    end
    checks++;
    if (sum != longint'(signed'(v))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h digits rebuild %0d", v, sum);
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
    check_a('0);
    check_a({33{1'b1}});
    check_a({1'b0, 32'h8080_8080});
    check_a({1'b1, 32'h0});
    check_a({1'b0, 32'h7777_7777});
    for (int k = 0; k < 3000; k++) check_a({$urandom, $urandom} >> 31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
