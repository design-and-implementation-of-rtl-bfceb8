// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// On start it loads the NW-bit numerator and DW-bit divisor; NW clocks later
// done pulses for one clock with quotient = num / den and remainder =
// num % den. Each clock shifts the next numerator bit into the partial
// remainder and subtracts the divisor when it fits. A zero divisor gives an
// all-ones quotient. busy is high while a division runs; start is ignored
// while busy. rst is synchronous and active high.
module seq_divider #(
  parameter int unsigned NW = 64,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);

  logic [DW-1:0]          d_q;
  logic [DW-1:0]          r_q;
  logic [$clog2(NW+1)-1:0] cnt_q;

  logic [DW:0] r_sh, r_sub;
  always_comb begin
    r_sh  = {r_q, quotient[NW-1]};
    r_sub = r_sh - {1'b0, d_q};
  end

  assign remainder = r_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
      d_q      <= '0;
      r_q      <= '0;
      cnt_q    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy     <= 1'b1;
        quotient <= num;
        d_q      <= den;
        r_q      <= '0;
        cnt_q    <= ($clog2(NW+1))'(NW);
      end else if (busy) begin
        if (!r_sub[DW]) begin
          r_q      <= r_sub[DW-1:0];
          quotient <= {quotient[NW-2:0], 1'b1};
        end else begin
          r_q      <= r_sh[DW-1:0];
          quotient <= {quotient[NW-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // done is the clock after the last busy clock, never during a division.
  a_done_not_busy: assert property (@(posedge clk) disable iff (rst)
    done |-> !busy);

endmodule
