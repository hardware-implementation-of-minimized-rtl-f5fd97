// serial_divider: a small divider for frame-rate image statistics that
// makes one quotient bit per clock with a single shared comparator.
//
// What it computes: quotient = round(dividend * 2^F / divisor), with halves
// rounded up, saturated to Q_W bits. F = DVS_W + Q_W - DVD_W. F is the number
// of fraction bits; it is whatever makes the first A-part exactly as wide as
// the divisor. Division by zero and results that do not fit in Q_W bits give
// all ones.
//
// How: the dividend is split in two. The A-part is its top DVS_W bits. The
// B-part is the rest, followed by zero bits. On the load clock the comparator
// checks the A-part against the divisor. A 1 there means the quotient cannot
// fit, and the overflow flag is set. After that, each clock moves the B-part's
// MSB into the A-part's LSB and the comparator makes one quotient bit: it
// subtracts when the A-part is not smaller than the divisor, else it keeps the
// A-part. After Q_W+1 such bits the last one is the rounding bit, and
// sd_round adds it.
//
// Interface: pulse start with the dividend and divisor while busy is low.
// The dividend is captured on that clock. The divisor is not registered: the
// source must hold it until the division ends, as frame-level statistics are
// held between frames anyway. This is checked by an assertion. quotient
// changes only on the clock that raises q_valid for one cycle, and holds its
// value until the next result.
// Timing: a result appears PERIOD clocks (default 16) after start, counting
// the start clock as the first, and a new division can start on the next
// clock. That is one division per 16 clocks.
//
// From the description: the A/B split, the single comparator, the
// subtract-or-keep step with LSB supplement, the 0 supplement and
// increment-unless-all-ones rounding, and the 16-clock rate. This design's own
// choices: the handshake, the fraction-bit alignment F, the overflow check on
// the first comparison, and the synchronous active-low reset.
module serial_divider #(
  parameter int unsigned DVD_W  = 28,
  parameter int unsigned DVS_W  = 20,
  parameter int unsigned Q_W    = 10,
  parameter int unsigned PERIOD = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DVD_W-1:0] dividend,
  input  logic [DVS_W-1:0] divisor,
  output logic             busy,
  output logic             q_valid,
  output logic [Q_W-1:0]   quotient
);
  // Dividend aligned so that its top DVS_W bits form the first A-part and the
  // low Q_W+1 bits (dividend tail and zero fill) feed the B-part.
  localparam int unsigned NW    = DVS_W + Q_W + 1;
  localparam int unsigned STEPS = Q_W + 1;

  if (DVD_W > NW) begin : g_width_check
    $error("serial_divider: DVD_W must not exceed DVS_W + Q_W + 1");
  end

  logic [NW-1:0]    n_word;
  logic [DVS_W:0]   a_q;
  logic [DVS_W:0]   cmp_a;
  logic [DVS_W:0]   a_next;
  logic             cmp_supp;
  logic             q_bit;
  logic             b_msb;
  logic             ovf_q;
  logic [Q_W:0]     t_q;
  logic [Q_W-1:0]   q_round;
  logic             load, step, done;

  assign n_word = NW'(dividend) << (NW - DVD_W);

  sd_ctrl #(.STEPS(STEPS), .PERIOD(PERIOD)) u_ctrl (
    .clk, .rst_n, .start, .busy, .load, .step, .done
  );

  // The load clock runs the first comparison on the fresh A-part; later clocks
  // run it on the registered A-part.
  always_comb begin
    if (load) begin
      cmp_a    = {1'b0, n_word[NW-1:Q_W+1]};
      cmp_supp = n_word[Q_W];
    end else begin
      cmp_a    = a_q;
      cmp_supp = b_msb;
    end
  end

  sd_comparator #(.DVS_W(DVS_W)) u_cmp (
    .a_part(cmp_a), .divisor, .supplement(cmp_supp), .q_bit, .a_next
  );

  sd_bpart #(.W(Q_W)) u_bpart (
    .clk, .rst_n, .load, .load_value(n_word[Q_W-1:0]), .shift(step), .msb(b_msb)
  );

  sd_quotient #(.W(Q_W + 1)) u_quot (
    .clk, .rst_n, .clear(load), .shift(step), .q_bit, .value(t_q)
  );

  sd_round #(.Q_W(Q_W)) u_round (
    .t(t_q), .overflow(ovf_q), .q(q_round)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q      <= '0;
      ovf_q    <= 1'b0;
      q_valid  <= 1'b0;
      quotient <= '0;
    end else begin
      if (load || step) a_q <= a_next;
      if (load)         ovf_q <= q_bit;
      q_valid <= done;
      if (done)         quotient <= q_round;
    end
  end

  // The divisor is not buffered, so the source must hold it while the
  // comparator is using it.
  assert property (@(posedge clk) disable iff (!rst_n) step |-> $stable(divisor))
    else $error("serial_divider: divisor changed during a division");
endmodule
