// tb_sd_quotient: self-checking test of the quotient shift-in register.
//
// Clears the register, shifts in random bits with idle clocks between some of
// them, and compares with a model word built here. Also checks that clear
// wins over shift and that reset empties the register.
module tb_sd_quotient;
  localparam int unsigned W = 11;

  logic         clk = 0;
  logic         rst_n;
  logic         clear;
  logic         shift;
  logic         q_bit;
  logic [W-1:0] value;

  int checks = 0;
  int failures = 0;

  sd_quotient #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_value(input logic [W-1:0] exp, input string what);
    checks++;
    if (value !== exp) begin
      failures++;
      $display("FAIL %s: value=%h exp %h", what, value, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] model;
    rst_n = 0; clear = 0; shift = 1; q_bit = 1;
    @(posedge clk); #1;
    expect_value('0, "reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      clear = 1; shift = 1; q_bit = 1;
      @(posedge clk); #1;
      clear = 0; shift = 0;
      model = '0;
      expect_value(model, "clear");
      for (int k = 0; k < W + 2; k++) begin
        if ($urandom % 3 == 0) begin
          q_bit = 1'($urandom);
          @(posedge clk); #1;
          expect_value(model, "hold");
        end
        q_bit = 1'($urandom);
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
        model = {model[W-2:0], q_bit};
        expect_value(model, "shift");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
