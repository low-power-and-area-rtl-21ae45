// Sub-shift register: SUB_LEN data latches plus one temporary storage latch.
//
// The long shift register is cut into sub-shift registers so that only
// SUB_LEN+1 delayed pulsed clocks are needed however long the register is.
// Each sub-shift register has SUB_LEN pulsed latches Q1..Q{SUB_LEN} holding
// its data bits and one extra latch T that keeps a copy of the last data bit
// for the next sub-shift register. Within a clock cycle the pulses fire in
// the order T, Q{SUB_LEN}, ..., Q2, Q1: T first saves the outgoing bit, then
// each data latch takes its predecessor's value after that predecessor has
// already been read, and Q1 last takes the input (the serial input, or the T
// latch of the previous sub-shift register). Because every latch sees a
// steady input throughout its own pulse, the latch chain shifts by exactly
// one place per clock, like a flip-flop chain with half the storage cells.
// This structure is the published one (4 data latches and T at the default).
//
// Interface: clk_pulse[0] is CLK-pulse T, clk_pulse[i] opens latch Qi;
// din/dinb is the differential serial input; q[i-1] is Qi (q[0] = Q1 is the
// newest bit); t/tb is the temporary latch, to be wired to the next
// sub-shift register's din/dinb.
// Timing: the pulses must not overlap (checked by an assertion) and must
// arrive in the order above; din/dinb must be steady during clk_pulse[1].
module sub_shift_register #(
  parameter int unsigned SUB_LEN = pl_shift_pkg::SUB_LEN
) (
  input  logic [SUB_LEN:0]   clk_pulse,
  input  logic               din,
  input  logic               dinb,
  output logic [SUB_LEN-1:0] q,
  output logic               t,
  output logic               tb
);
  timeunit 1ps; timeprecision 1ps;

  logic [SUB_LEN-1:0] qb;

  // The non-overlap rule that makes the latch chain safe.
  always_comb begin
    assert ($onehot0(clk_pulse))
      else $error("sub_shift_register: overlapping pulsed clocks %b", clk_pulse);
  end

  for (genvar i = 0; i < SUB_LEN; i++) begin : g_data
    if (i == 0) begin : g_first
      modified_ssaspl u_lat (
        .clk_pulse(clk_pulse[1]),
        .d        (din),
        .db       (dinb),
        .q        (q[0]),
        .qb       (qb[0])
      );
    end else begin : g_next
      modified_ssaspl u_lat (
        .clk_pulse(clk_pulse[i+1]),
        .d        (q[i-1]),
        .db       (qb[i-1]),
        .q        (q[i]),
        .qb       (qb[i])
      );
    end
  end

  modified_ssaspl u_tmp (
    .clk_pulse(clk_pulse[0]),
    .d        (q[SUB_LEN-1]),
    .db       (qb[SUB_LEN-1]),
    .q        (t),
    .qb       (tb)
  );
endmodule
