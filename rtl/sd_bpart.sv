// sd_bpart: the B-part shift register of the serial divider.
//
// The B-part holds the low end of the dividend. At each comparison it moves
// one place left, and the bit leaving at its MSB fills the LSB of the next
// A-part. Zeros enter at its LSB. Once the dividend bits are used up, zeros
// therefore follow. They supply the fraction bits of the quotient and its
// final rounding bit.
//
// Interface: load takes load_value; shift moves the register left by one.
// load wins if both are high. msb shows the bit that the next shift will hand
// to the A-part.
// Timing: one register, updated on the rising clock edge; synchronous
// active-low reset to zero.
//
// From the description: the left shift and the hand-off of the MSB. This
// design's own choices: the zero fill, and the register width (set by the
// parent to the quotient width plus one).
module sd_bpart #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_value,
  input  logic         shift,
  output logic         msb
);
  logic [W-1:0] b_q;

  always_ff @(posedge clk) begin
    if (!rst_n)     b_q <= '0;
    else if (load)  b_q <= load_value;
    else if (shift) b_q <= {b_q[W-2:0], 1'b0};
  end

  assign msb = b_q[W-1];
endmodule
