// Clock-pulse circuit (behavioural model of an analog delay cell plus gate).
//
// Makes one short pulse on every rising edge of its clock input: the clock is
// ANDed with an inverted, delayed copy of itself, so the output is high from
// the rising edge until the delayed copy catches up. The structure (a delay
// circuit and an AND gate) follows the published circuit; the delay is an
// analog inverter chain in silicon and is modelled here with a transport
// delay, so this file is for simulation only.
//
// Interface: clk_in (clock, possibly already delayed), clk_pulse (pulse out).
// Timing: clk_pulse rises with clk_in and is WIDTH_PS wide; clk_in must stay
// high, and low, for longer than WIDTH_PS (the delay is modelled as a process
// that waits out WIDTH_PS). Falling edges of clk_in give no pulse.
module clock_pulse_circuit #(
  parameter int unsigned WIDTH_PS = pl_shift_pkg::PULSE_WIDTH_PS
) (
  input  logic clk_in,
  output logic clk_pulse
);
  timeunit 1ps; timeprecision 1ps;

  logic clk_dly;

  initial clk_dly = 1'b0;
  always @(clk_in) clk_dly <= #(WIDTH_PS) clk_in;

  assign clk_pulse = clk_in & ~clk_dly;
endmodule
