// tb_r256_precomputer: checks the eight FDMPPs (+-1B, +-3B, +-5B, +-7B)
// against multiplication by a constant, for corner and random 33-bit B.
module tb_r256_precomputer;
  import r256_pkg::*;
  localparam int unsigned BW = 33;

  logic [BW-1:0] b;
  logic [BW+2:0] fdmpp [NUM_FDMPP];
  int checks = 0, failures = 0;

  r256_precomputer #(.BW(BW)) dut (.b(b), .fdmpp(fdmpp));

  task automatic check_b(input logic [BW-1:0] v);
    longint bs;
    longint mult [NUM_FDMPP] = '{1, -1, 3, -3, 5, -5, 7, -7};
    b = v;
    #1;
    bs = longint'(signed'(v));
    for (int i = 0; i < NUM_FDMPP; i++) begin
      logic [BW+2:0] expv;
      expv = (BW+3)'(bs * mult[i]);
      checks++;
      if (fdmpp[i] !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h idx=%0d got=%h exp=%h", v, i, fdmpp[i], expv);
      end
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
    check_b('0);
    check_b(33'd1);
    check_b({1'b1, 32'b0});
    check_b({1'b0, {32{1'b1}}});
    check_b({33{1'b1}});
    for (int k = 0; k < 2000; k++) check_b({$urandom, $urandom} >> 31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
