// sd_ctrl: sequencer of the serial divider.
//
// A division takes a fixed frame of PERIOD clocks, 16 by default. The first
// clock is the one on which start is sampled high while the divider is idle.
// On that clock load is high: the dividend goes into the A- and B-parts, and
// the comparator makes its first decision, the overflow check. On each of the
// next STEPS clocks step is high and the comparator makes one quotient bit.
// On the PERIOD-th clock done is high: the rounded quotient is registered, and
// the divider is idle again from the following clock. The clocks between the
// last step and done do nothing. This gives one result per 16 clocks, the
// figure given for the 28/20/10-bit example. Keeping start high therefore
// delivers results on clocks 16, 32, 48 and so on.
//
// Interface: start (request, ignored while busy), busy (a division is in
// progress), load / step / done (datapath strobes, combinational from the
// state).
// Timing: one counter of clog2(PERIOD) bits and a state bit; synchronous
// active-low reset to idle.
//
// From the description: one comparison per clock and the 16-clock period.
// This design's own choices: the start/busy handshake and the idle padding
// before done.
module sd_ctrl #(
  parameter int unsigned STEPS  = 11,
  parameter int unsigned PERIOD = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic load,
  output logic step,
  output logic done
);
  localparam int unsigned CW = $clog2(PERIOD);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t        state_q;
  logic [CW-1:0] cnt_q;

  if (PERIOD < STEPS + 2) begin : g_period_check
    $error("sd_ctrl: PERIOD must be at least STEPS + 2");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else if (load) begin
      state_q <= S_RUN;
      cnt_q   <= CW'(1);
    end else if (done) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else if (state_q == S_RUN) begin
      cnt_q   <= cnt_q + CW'(1);
    end
  end

  always_comb begin
    busy = (state_q == S_RUN);
    load = (state_q == S_IDLE) && start;
    step = busy && (cnt_q >= CW'(1)) && (cnt_q <= CW'(STEPS));
    done = busy && (cnt_q == CW'(PERIOD - 1));
  end
endmodule
