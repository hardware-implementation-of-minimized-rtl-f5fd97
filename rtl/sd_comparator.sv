// sd_comparator: the one comparator that the serial divider shares across every
// quotient bit.
//
// Each clock the divider makes one restoring-division decision. The comparator
// checks whether the current A-part (the partial remainder) is at least the
// divisor. If so, the quotient bit is 1 and the A-part drops by the divisor.
// Otherwise the quotient bit is 0 and the A-part is kept. Either way, the
// result moves one place left and the supplement bit fills its LSB. That bit
// is the MSB of the B-part, or 0 once the dividend bits run out.
//
// Interface: a_part is DVS_W+1 bits wide. A remainder is always below the
// divisor, so it fits in DVS_W bits, and the left shift adds one. An A-part
// equal to the divisor counts as "not smaller" and gives quotient bit 1.
// Timing: purely combinational; the caller registers a_next.
//
// From the description: the compare / subtract-or-keep / shift-and-supplement
// step. This design's own choices: an A-part one bit wider than the divisor,
// so that no remainder bit is lost, and ties resolved as quotient bit 1.
module sd_comparator #(
  parameter int unsigned DVS_W = 20
) (
  input  logic [DVS_W:0]   a_part,
  input  logic [DVS_W-1:0] divisor,
  input  logic             supplement,
  output logic             q_bit,
  output logic [DVS_W:0]   a_next
);
  logic [DVS_W-1:0] diff;
  logic [DVS_W-1:0] kept;

  always_comb begin
    q_bit  = (a_part >= {1'b0, divisor});
    // When q_bit is 1 the difference is below the divisor, so DVS_W bits hold it.
    diff   = a_part[DVS_W-1:0] - divisor;
    kept   = q_bit ? diff : a_part[DVS_W-1:0];
    // Shift the new A-part left by one and fill the LSB with the supplement bit.
    a_next = {kept, supplement};
  end
endmodule
