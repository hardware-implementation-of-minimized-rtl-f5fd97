// tb_sd_round: self-checking test of the rounding and saturation unit.
//
// Sweeps every quotient/rounding-bit pair for a 10-bit quotient, with and
// without the overflow flag, and checks against: overflow gives all ones,
// an all-ones quotient stays all ones, otherwise quotient + rounding bit.
module tb_sd_round;
  localparam int unsigned Q_W = 10;

  logic [Q_W:0]   t;
  logic           overflow;
  logic [Q_W-1:0] q;

  int checks = 0;
  int failures = 0;

  sd_round #(.Q_W(Q_W)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp, hi;
    for (int o = 0; o < 2; o++) begin
      for (int unsigned v = 0; v < (1 << (Q_W + 1)); v++) begin
        t = (Q_W+1)'(v);
        overflow = 1'(o);
        #1;
        hi = v >> 1;
        if (o == 1 || hi == (1 << Q_W) - 1) exp = (1 << Q_W) - 1;
        else                                 exp = hi + (v & 1);
        checks++;
        if (q !== Q_W'(exp)) begin
          failures++;
          $display("FAIL t=%0d ovf=%0d q=%0d exp %0d", v, o, q, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
