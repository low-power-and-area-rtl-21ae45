// Delayed pulsed clock generator (behavioural model).
//
// From one clock it makes SUB_LEN+1 non-overlapping pulsed clocks per cycle,
// one per latch of a sub-shift register. The clock runs down a chain of delay
// stages, STEP_PS each; every tap feeds its own clock-pulse circuit, so each
// pulse is cut sharply by a gate from two delayed signals and can be narrower
// than the rise and fall times of the chain would otherwise allow.
//
// Output clk_pulse[0] is CLK-pulse T, for the temporary storage latch, and
// fires first; then clk_pulse[SUB_LEN], clk_pulse[SUB_LEN-1], ... and
// clk_pulse[1] last. The firing order, reverse to the data flow, is the
// published scheme: each latch updates after the latch it feeds. The delay
// values are this design's choice.
//
// Timing: the k-th pulse to fire (k = 0..SUB_LEN) rises k*STEP_PS after the
// rising clock edge and is WIDTH_PS wide. STEP_PS > WIDTH_PS keeps the pulses
// apart; the whole train must end before the next rising edge. Each delay
// stage is modelled as a process that waits out its delay, so STEP_PS must also
// be shorter than the high and the low time of clk.
module delayed_pulse_gen #(
  parameter int unsigned SUB_LEN  = pl_shift_pkg::SUB_LEN,
  parameter int unsigned STEP_PS  = pl_shift_pkg::PULSE_STEP_PS,
  parameter int unsigned WIDTH_PS = pl_shift_pkg::PULSE_WIDTH_PS
) (
  input  logic             clk,
  output logic [SUB_LEN:0] clk_pulse
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NPULSE = SUB_LEN + 1;

  // tap[k]: the clock delayed by k*STEP_PS; dly holds the delayed taps
  logic [NPULSE-1:0] tap;
  logic [NPULSE-1:1] dly;
  // slot[k]: the k-th pulse to fire in a cycle
  logic [NPULSE-1:0] slot;

  initial begin
    assert (STEP_PS > WIDTH_PS)
      else $error("delayed_pulse_gen: pulses of %0d ps spaced %0d ps would overlap",
                  WIDTH_PS, STEP_PS);
  end

  assign tap = {dly, clk};

  for (genvar k = 1; k < NPULSE; k++) begin : g_delay
    initial dly[k] = 1'b0;
    always @(tap[k-1]) dly[k] <= #(STEP_PS) tap[k-1];
  end

  for (genvar k = 0; k < NPULSE; k++) begin : g_pulse
    clock_pulse_circuit #(.WIDTH_PS(WIDTH_PS)) u_cpc (
      .clk_in   (tap[k]),
      .clk_pulse(slot[k])
    );
  end

  // slot 0 drives the temporary latch; later slots walk back from the last
  // data latch to the first
  assign clk_pulse[0] = slot[0];
  for (genvar i = 1; i <= SUB_LEN; i++) begin : g_map
    assign clk_pulse[i] = slot[NPULSE-i];
  end
endmodule
