// tb_div_config: checking harness for one width configuration of the serial
// divider, used by tb_serial_divider_configs.
//
// It runs NDIV divisions on a divider built with the given widths and period.
// The operands are a few corner cases (zero divisor, overflow, largest
// operands) followed by random ones aimed at in-range quotients. It compares
// each result with round(dividend * 2^F / divisor), F = DVS_W + Q_W - DVD_W,
// saturated to Q_W bits, and checks that each result comes PERIOD clocks after
// its start. It raises finished when done and reports its counts on
// checks/failures.
module tb_div_config #(
  parameter int unsigned DVD_W  = 28,
  parameter int unsigned DVS_W  = 20,
  parameter int unsigned Q_W    = 10,
  parameter int unsigned PERIOD = 16,
  parameter int unsigned NDIV   = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned F = DVS_W + Q_W - DVD_W;
  localparam longint unsigned QMAX = (64'd1 << Q_W) - 1;
  localparam longint unsigned DMASK = (64'd1 << DVD_W) - 1;
  localparam longint unsigned VMASK = (64'd1 << DVS_W) - 1;

  logic             start;
  logic [DVD_W-1:0] dividend;
  logic [DVS_W-1:0] divisor;
  logic             busy;
  logic             q_valid;
  logic [Q_W-1:0]   quotient;

  serial_divider #(.DVD_W(DVD_W), .DVS_W(DVS_W), .Q_W(Q_W), .PERIOD(PERIOD)) dut (.*);

  function automatic longint unsigned ref_q(input longint unsigned d, input longint unsigned v);
    longint unsigned t;
    if (v == 0) return QMAX;
    t = (d << (F + 1)) / v;
    if (t >= (64'd1 << (Q_W + 1))) return QMAX;
    return ((t + 1) >> 1) > QMAX ? QMAX : (t + 1) >> 1;
  endfunction

  task automatic divide(input longint unsigned d, input longint unsigned v);
    longint unsigned e;
    int lat;
    dividend = DVD_W'(d);
    divisor  = DVS_W'(v);
    start    = 1;
    e        = ref_q(d & DMASK, v & VMASK);
    lat      = 1;
    @(posedge clk); #1;
    start = 0;
    while (!q_valid && lat < 4 * PERIOD) begin
      @(posedge clk); #1;
      lat++;
    end
    checks += 2;
    if (quotient !== Q_W'(e)) begin
      failures++;
      $display("FAIL %0d/%0d/%0d: %0d / %0d = %0d exp %0d", DVD_W, DVS_W, Q_W,
               d & DMASK, v & VMASK, quotient, e);
    end
    // lat counts the start clock as 1, up to the clock that raised q_valid.
    if (lat != int'(PERIOD)) begin
      failures++;
      $display("FAIL %0d/%0d/%0d: latency %0d exp %0d", DVD_W, DVS_W, Q_W, lat, PERIOD);
    end
  endtask

  initial begin
    longint unsigned d, v, q;
    finished = 0; checks = 0; failures = 0;
    start = 0; dividend = '0; divisor = '0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    #1;
    divide(DMASK, 0);
    divide(DMASK, 1);
    divide(DMASK, VMASK);
    divide(0, VMASK);
    for (int n = 0; n < int'(NDIV); n++) begin
      v = (longint'({$urandom, $urandom}) & VMASK) >> ($urandom % DVS_W);
      if (v == 0) v = 1;
      q = longint'({$urandom, $urandom}) & QMAX;
      d = ((q * v) >> F) + longint'($urandom % 4);
      if ($urandom % 5 == 0) d = longint'({$urandom, $urandom});
      divide(d & DMASK, v);
    end
    finished = 1;
  end
endmodule
