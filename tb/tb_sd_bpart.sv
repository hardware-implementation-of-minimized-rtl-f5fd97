// tb_sd_bpart: self-checking test of the B-part shift register.
//
// Loads random words and checks that the MSB output walks through the word
// from its top bit down, then gives zeros. Also checks that load wins over
// shift, that the register holds when neither is high, and that reset clears it.
module tb_sd_bpart;
  localparam int unsigned W = 10;

  logic         clk = 0;
  logic         rst_n;
  logic         load;
  logic [W-1:0] load_value;
  logic         shift;
  logic         msb;

  int checks = 0;
  int failures = 0;

  sd_bpart #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_msb(input bit exp, input string what);
    checks++;
    if (msb !== exp) begin
      failures++;
      $display("FAIL %s: msb=%0b exp %0b", what, msb, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    rst_n = 0; load = 0; shift = 0; load_value = '1;
    @(posedge clk); #1;
    expect_msb(1'b0, "reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      v = W'($urandom);
      load = 1; shift = (n % 2 == 1); load_value = v;
      @(posedge clk); #1;
      load = 0; shift = 0; load_value = ~v;
      expect_msb(v[W-1], "after load");
      for (int k = 1; k < W + 3; k++) begin
        // Idle clocks in between must not move the register.
        if ($urandom % 4 == 0) begin
          @(posedge clk); #1;
          expect_msb((k - 1 < W) ? v[W-k] : 1'b0, "hold");
        end
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
        expect_msb((k < W) ? v[W-1-k] : 1'b0, "shift");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
