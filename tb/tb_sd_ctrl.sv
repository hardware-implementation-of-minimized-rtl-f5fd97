// tb_sd_ctrl: self-checking test of the divider's sequencer.
//
// Checks, against a cycle count kept here, that a start while idle gives load
// on that clock, step on the next STEPS clocks, and done on clock PERIOD,
// with busy high from the clock after load until done. Also checks that start
// is ignored while busy, and that a start held high gives done every PERIOD
// clocks (clocks 16, 32, 48, ... for PERIOD = 16).
module tb_sd_ctrl;
  localparam int unsigned STEPS  = 11;
  localparam int unsigned PERIOD = 16;

  logic clk = 0;
  logic rst_n;
  logic start;
  logic busy, load, step, done;

  int checks = 0;
  int failures = 0;

  sd_ctrl #(.STEPS(STEPS), .PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_bits(input bit e_busy, input bit e_load, input bit e_step,
                             input bit e_done, input int cyc);
    checks++;
    if ({busy, load, step, done} !== {e_busy, e_load, e_step, e_done}) begin
      failures++;
      $display("FAIL clock %0d: busy/load/step/done=%b%b%b%b exp %b%b%b%b", cyc,
               busy, load, step, done, e_busy, e_load, e_step, e_done);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done_at[$];
    int cyc;
    rst_n = 0; start = 1;
    repeat (2) @(posedge clk);
    #1; rst_n = 1; start = 0;
    #1 expect_bits(0, 0, 0, 0, 0);
    // Single divisions, with random start noise while busy.
    for (int n = 0; n < 50; n++) begin
      repeat ($urandom % 4) begin
        @(posedge clk); #1;
        expect_bits(0, 0, 0, 0, 0);
      end
      start = 1;
      #1 expect_bits(0, 1, 0, 0, 1);
      for (int c = 2; c <= PERIOD; c++) begin
        @(posedge clk); #1;
        start = 1'($urandom);
        #1 expect_bits(1, 0, (c >= 2 && c <= STEPS + 1), (c == PERIOD), c);
      end
      @(posedge clk); #1;
      start = 0;
      #1 expect_bits(0, 0, 0, 0, 0);
    end
    // Start held high: done every PERIOD clocks, counting the first start clock as 1.
    start = 1;
    cyc = 1;
    for (int c = 0; c < 7 * PERIOD; c++) begin
      #1 if (done) done_at.push_back(cyc);
      @(posedge clk); #1;
      cyc++;
    end
    start = 0;
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (k >= done_at.size() || done_at[k] != (k + 1) * PERIOD) begin
        failures++;
        $display("FAIL result %0d at clock %0d exp %0d", k + 1,
                 (k < done_at.size()) ? done_at[k] : -1, (k + 1) * PERIOD);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
