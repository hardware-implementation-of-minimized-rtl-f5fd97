// tb_serial_divider: end-to-end, self-checking test of the serial divider at
// its default size (28-bit dividend, 20-bit divisor, 10-bit quotient, one
// result per 16 clocks).
//
// The reference is integer arithmetic done here: quotient =
// round(dividend * 2^F / divisor), with halves rounded up and F = 20 + 10 - 28
// = 2. A zero divisor, or a quotient of 2^10 or more, gives all ones. Every
// result is compared. Every latency is checked: the result must come out on
// the 16th clock, counting the start clock as the first. quotient must not
// change between results.
//
// Phases: directed corner cases; random single divisions with start toggled
// and the dividend scrambled while busy (both must be ignored); then start
// held high for a run of back-to-back divisions, whose first seven results
// must land on clocks 16, 32, ..., 112. The test counts each mechanism it
// exercises: overflow saturation, division by zero, round-up, the all-ones
// guard on rounding, an exact result, start ignored while busy, and
// back-to-back operation. A mechanism that never happened is a failure.
module tb_serial_divider;
  localparam int unsigned DVD_W  = 28;
  localparam int unsigned DVS_W  = 20;
  localparam int unsigned Q_W    = 10;
  localparam int unsigned PERIOD = 16;
  localparam int unsigned F      = DVS_W + Q_W - DVD_W;
  localparam longint unsigned QMAX = (64'd1 << Q_W) - 1;

  logic             clk = 0;
  logic             rst_n;
  logic             start;
  logic [DVD_W-1:0] dividend;
  logic [DVS_W-1:0] divisor;
  logic             busy;
  logic             q_valid;
  logic [Q_W-1:0]   quotient;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  // Mechanism counters.
  int n_overflow = 0, n_div0 = 0, n_round_up = 0, n_all_ones_guard = 0;
  int n_exact = 0, n_start_ignored = 0, n_back_to_back = 0;

  longint unsigned exp_q[$];
  int              start_edge[$];
  int              result_edge[$];

  serial_divider dut (.*);

  always #5 clk = ~clk;

  // Reference model; also tallies which mechanism the operands exercise.
  function automatic longint unsigned ref_q(input longint unsigned d, input longint unsigned v,
                                            input bit tally);
    longint unsigned t;
    if (v == 0) begin
      if (tally) begin n_div0++; n_overflow++; end
      return QMAX;
    end
    t = (d << (F + 1)) / v;
    if (t >= (64'd1 << (Q_W + 1))) begin
      if (tally) n_overflow++;
      return QMAX;
    end
    if (tally) begin
      if (t == (64'd1 << (Q_W + 1)) - 1) n_all_ones_guard++;
      else if (t[0]) n_round_up++;
      if ((d << F) % v == 0) n_exact++;
    end
    return ((t + 1) >> 1) > QMAX ? QMAX : (t + 1) >> 1;
  endfunction

  function automatic void fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endfunction

  // Monitor: counts clocks, checks each result, its latency and that the
  // output holds between results.
  initial begin : monitor
    logic [Q_W-1:0]  last_q;
    longint unsigned e;
    int              s;
    last_q = '0;
    forever begin
      @(posedge clk);
      cyc++;
      #1;
      if (rst_n && q_valid) begin
        checks += 2;
        if (exp_q.size() == 0) begin
          fail("unexpected result");
        end else begin
          e = exp_q.pop_front();
          s = start_edge.pop_front();
          result_edge.push_back(cyc);
          if (quotient !== Q_W'(e))
            fail($sformatf("quotient %0d exp %0d", quotient, e));
          if (cyc - s + 1 != PERIOD)
            fail($sformatf("latency %0d clocks exp %0d", cyc - s + 1, PERIOD));
        end
        last_q = quotient;
      end else if (rst_n) begin
        checks++;
        if (quotient !== last_q) fail("quotient changed without q_valid");
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One division: apply operands while idle, start, wait for the result,
  // meanwhile disturbing start and the dividend.
  task automatic divide(input longint unsigned d, input longint unsigned v);
    while (busy) begin @(posedge clk); #1; end
    dividend = DVD_W'(d);
    divisor  = DVS_W'(v);
    start    = 1;
    exp_q.push_back(ref_q(d, v, 1'b1));
    start_edge.push_back(cyc + 1);
    @(posedge clk); #1;
    start = 0;
    while (!q_valid) begin
      if ($urandom % 3 == 0) begin
        start = 1;
        dividend = DVD_W'({$urandom, $urandom});
        n_start_ignored++;
      end else begin
        start = 0;
      end
      @(posedge clk); #1;
    end
    start = 0;
  endtask

  function automatic longint unsigned rand_divisor();
    longint unsigned v;
    v = longint'($urandom) & ((64'd1 << DVS_W) - 1);
    return v >> ($urandom % DVS_W);
  endfunction

  // Operands whose quotient lands near a random target, so that most results
  // are in range rather than saturated.
  task automatic rand_operands(output longint unsigned d, output longint unsigned v);
    longint unsigned q;
    v = rand_divisor();
    if (v == 0) v = 1;
    q = longint'($urandom) & QMAX;
    d = ((q * v) >> F) + longint'($urandom % 4);
    if ($urandom % 5 == 0) d = longint'({$urandom, $urandom});
    d = d & ((64'd1 << DVD_W) - 1);
  endtask

  initial begin
    longint unsigned d, v;
    rst_n = 0; start = 0; dividend = '0; divisor = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // Directed corner cases.
    divide(1000, 0);                                   // division by zero
    divide(0, 12345);                                  // zero dividend
    divide((64'd1 << DVD_W) - 1, 1);                   // huge overflow
    divide(1000, 1000);                                // exact 1.0 -> 4 (F = 2)
    divide(3, 8);                                      // 1.5 -> rounds up to 2
    divide(2047 * 128, 1024);                          // T = 2047: all-ones guard
    divide(1024 * 256, 256 * 4);                       // exactly 2^Q_W: overflow
    divide(5, 4);                                      // 5*4/4 = 5 exact
    divide((64'd1 << DVD_W) - 1, (64'd1 << DVS_W) - 1); // largest operands

    // Random single divisions.
    for (int n = 0; n < 400; n++) begin
      rand_operands(d, v);
      divide(d, v);
    end
    while (busy || exp_q.size() != 0) begin @(posedge clk); #1; end

    // Back-to-back run with start held high: new operands are applied on the
    // clock between one result and the next load.
    result_edge.delete();
    rand_operands(d, v);
    dividend = DVD_W'(d); divisor = DVS_W'(v);
    start = 1;
    begin
      int first;
      first = cyc + 1;
      exp_q.push_back(ref_q(d, v, 1'b1));
      start_edge.push_back(first);
      for (int n = 1; n < 30; n++) begin
        @(posedge clk); #1;
        while (busy) begin @(posedge clk); #1; end
        rand_operands(d, v);
        dividend = DVD_W'(d); divisor = DVS_W'(v);
        exp_q.push_back(ref_q(d, v, 1'b1));
        start_edge.push_back(cyc + 1);
      end
      @(posedge clk); #1;
      start = 0;
      while (busy || exp_q.size() != 0) begin @(posedge clk); #1; end
      // Table of result clocks: 16, 32, 48, ... counting the first start clock as 1.
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (k >= result_edge.size() || result_edge[k] - first + 1 != (k + 1) * PERIOD)
          fail($sformatf("back-to-back result %0d at clock %0d exp %0d", k + 1,
                         (k < result_edge.size()) ? result_edge[k] - first + 1 : -1,
                         (k + 1) * PERIOD));
        else n_back_to_back++;
      end
    end

    $display("mechanisms: overflow=%0d div0=%0d round_up=%0d all_ones_guard=%0d exact=%0d start_ignored=%0d back_to_back=%0d",
             n_overflow, n_div0, n_round_up, n_all_ones_guard, n_exact, n_start_ignored, n_back_to_back);
    checks += 7;
    if (n_overflow == 0)       fail("overflow never happened");
    if (n_div0 == 0)           fail("division by zero never happened");
    if (n_round_up == 0)       fail("round-up never happened");
    if (n_all_ones_guard == 0) fail("all-ones guard never happened");
    if (n_exact == 0)          fail("exact result never happened");
    if (n_start_ignored == 0)  fail("start while busy never happened");
    if (n_back_to_back == 0)   fail("back-to-back never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
