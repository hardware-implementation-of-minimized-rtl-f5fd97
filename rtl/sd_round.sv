// sd_round: final rounding and saturation of the serial divider's quotient.
//
// The quotient register holds the Q_W quotient bits and one bit below them.
// That bit is the quotient bit made after a 0 has been supplemented, i.e. the
// half-LSB of the true quotient. If it is 0 the quotient passes unchanged. If
// it is 1 the quotient is incremented, which rounds to nearest with halves
// rounded up. An all-ones quotient is never incremented, so it cannot wrap to
// zero. If the very first comparison found the quotient too large for Q_W
// bits (overflow, including division by zero), the output is all ones.
//
// Interface: t = {quotient, half_bit}; overflow from the first comparison;
// q = rounded, saturated quotient. Timing: purely combinational.
//
// From the description: the increment on a 1 remainder bit and the all-ones
// guard. This design's own choice: saturating on overflow.
module sd_round #(
  parameter int unsigned Q_W = 10
) (
  input  logic [Q_W:0]   t,
  input  logic           overflow,
  output logic [Q_W-1:0] q
);
  logic [Q_W-1:0] trunc;

  always_comb begin
    trunc = t[Q_W:1];
    if (overflow || (&trunc)) q = '1;
    else                      q = trunc + Q_W'(t[0]);
  end
endmodule
