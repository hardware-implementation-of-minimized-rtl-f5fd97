// tb_sd_comparator: self-checking test of the shared comparator step.
//
// Drives random divisors and A-parts and checks the quotient bit and the new
// A-part against integer arithmetic worked out here. Corner cases: an A-part
// equal to the divisor, zero, the largest legal A-part (2*divisor - 1), and a
// zero divisor. A-parts at or above 2*divisor are outside what the divider can
// produce, so for them only the quotient bit is checked.
module tb_sd_comparator;
  localparam int unsigned DVS_W = 20;

  logic [DVS_W:0]   a_part;
  logic [DVS_W-1:0] divisor;
  logic             supplement;
  logic             q_bit;
  logic [DVS_W:0]   a_next;

  int checks = 0;
  int failures = 0;

  sd_comparator #(.DVS_W(DVS_W)) dut (.*);

  task automatic check_one(input longint unsigned a, input longint unsigned d, input bit s);
    longint unsigned exp_a;
    bit              exp_q;
    a_part     = (DVS_W+1)'(a);
    divisor    = DVS_W'(d);
    supplement = s;
    #1;
    exp_q = (a >= d);
    checks++;
    if (q_bit !== exp_q) begin
      failures++;
      $display("FAIL q_bit a=%0d d=%0d got %0b exp %0b", a, d, q_bit, exp_q);
    end
    if (a < 2 * d || d == 0) begin
      exp_a = (((exp_q ? a - d : a) << 1) | longint'(s)) & ((64'd1 << (DVS_W + 1)) - 1);
      checks++;
      if (a_next !== (DVS_W+1)'(exp_a)) begin
        failures++;
        $display("FAIL a_next a=%0d d=%0d s=%0b got %0d exp %0d", a, d, s, a_next, exp_a);
      end
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned d, a;
    check_one(5, 5, 1'b0);
    check_one(4, 5, 1'b1);
    check_one(0, 7, 1'b1);
    check_one(9, 5, 1'b1);
    check_one(0, 0, 1'b0);
    check_one((64'd1 << DVS_W) - 1, (64'd1 << DVS_W) - 1, 1'b1);
    check_one((64'd1 << (DVS_W + 1)) - 2, (64'd1 << DVS_W) - 1, 1'b0);
    check_one((64'd1 << (DVS_W + 1)) - 1, 3, 1'b0);
    for (int i = 0; i < 5000; i++) begin
      d = longint'($urandom) & ((64'd1 << DVS_W) - 1);
      if (i % 4 == 0) d = d >> ($urandom % DVS_W);
      if (d == 0) d = 1;
      a = (longint'($urandom) * 2 + longint'($urandom % 2)) % (2 * d);
      check_one(a, d, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
