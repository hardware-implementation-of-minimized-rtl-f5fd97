// sd_quotient: the quotient register of the serial divider.
//
// The comparator makes one quotient bit per comparison, most significant
// bit first. This register shifts each bit in at its LSB. After the last
// comparison it holds the quotient, followed by one extra bit below it,
// which the rounding unit uses.
//
// Interface: clear empties the register at the start of a division; shift
// takes in q_bit. clear wins if both are high. value is the register contents.
// Timing: one register, updated on the rising clock edge; synchronous
// active-low reset to zero.
//
// From the description: the quotient bits are collected one per comparison.
// This design's own choices: the shift-in order and the extra rounding bit
// kept below the LSB.
module sd_quotient #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift,
  input  logic         q_bit,
  output logic [W-1:0] value
);
  always_ff @(posedge clk) begin
    if (!rst_n)     value <= '0;
    else if (clear) value <= '0;
    else if (shift) value <= {value[W-2:0], q_bit};
  end
endmodule
