// Modified SSASPL: static differential sense-amplifier shared pulsed latch.
//
// A one-bit level-sensitive latch opened by a short clock pulse. It takes its
// data differentially: D and Db come straight from the Q and Qb outputs of the
// preceding latch, which is what lets the modified cell drop the input
// inverter of the original cell. While clk_pulse is high the latch follows the
// differential input; while it is low it holds. The sense amplifier only
// resolves a real differential signal, so with D == Db (no differential input)
// the latch keeps its value; that rule is this model's reading of a sense
// amplifier and not something the transistor-level description spells out.
//
// Interface: clk_pulse (pulsed clock, active high), d/db (differential data
// in), q/qb (differential data out, always complementary).
// Timing: transparent for the width of clk_pulse; the value present at the
// falling edge of the pulse is held. It is a latch on purpose: a latch is the
// whole point of the design, so tool messages about an inferred latch here
// are expected.
module modified_ssaspl (
  input  logic clk_pulse,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);
  timeunit 1ps; timeprecision 1ps;

  logic state;

  always_latch begin
    if (clk_pulse && (d != db)) state = d;
  end

  assign q  = state;
  assign qb = ~state;
endmodule
