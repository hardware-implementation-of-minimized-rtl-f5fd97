// tb_serial_divider_configs: runs the serial divider in the four width
// configurations of the published size comparison, side by side:
// dividend/divisor/quotient = 33/24/13, 28/20/10, 24/16/8 and 11/13/14 bits.
// The first three use the 16-clock period. The 11/13/14 configuration needs 15
// quotient and rounding decisions plus load and output, so it runs with a
// 17-clock period. Each harness checks values and latency; this module sums
// their counts.
module tb_serial_divider_configs;
  logic clk = 0;
  logic rst_n;
  logic fin [4];
  int   chk [4];
  int   fl  [4];

  always #5 clk = ~clk;

  tb_div_config #(.DVD_W(33), .DVS_W(24), .Q_W(13), .PERIOD(16)) u_c1 (
    .clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  tb_div_config #(.DVD_W(28), .DVS_W(20), .Q_W(10), .PERIOD(16)) u_c2 (
    .clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  tb_div_config #(.DVD_W(24), .DVS_W(16), .Q_W(8),  .PERIOD(16)) u_c3 (
    .clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  tb_div_config #(.DVD_W(11), .DVS_W(13), .Q_W(14), .PERIOD(17)) u_c4 (
    .clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));

  initial begin
    int checks, failures, cycles;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cycles = 0;
    while (!(fin[0] && fin[1] && fin[2] && fin[3]) && cycles < 100000) begin
      @(posedge clk);
      cycles++;
    end
    #2;
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    if (cycles >= 100000) begin
      failures++;
      $display("FAIL watchdog");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
