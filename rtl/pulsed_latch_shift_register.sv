// Low-power, area-efficient WORD_LEN-bit shift register built from pulsed
// latches (top level).
//
// A pulsed latch is about half the size of a master-slave flip-flop, but a
// plain chain of latches all opened by one pulse races: a latch's input
// changes while it is still open. This register avoids the race with several
// non-overlapping delayed pulses fired in reverse data order, and keeps the
// number of pulses small by cutting the register into WORD_LEN/SUB_LEN
// sub-shift registers of SUB_LEN data latches each. Each sub-shift register
// adds one temporary latch T that carries its last bit over to the next one,
// so all sub-shift registers can share the same SUB_LEN+1 pulses from one
// delayed pulsed clock generator. Defaults (256 bits, 4-bit sub-shift
// registers, 64 sub-shift registers, 320 latches, 200 MHz clock) are the
// published configuration.
//
// Interface: clk is the system clock; din is the serial input, sampled during
// the last pulse of each cycle (hold it steady from just after the rising
// edge to the end of the pulse train); q[WORD_LEN-1:0] is the parallel
// content, q[0] the newest bit and q[WORD_LEN-1] the oldest; dout = q[WORD_LEN-1]
// is the serial output. The single-ended din is turned into the differential
// pair the first latch needs by one inverter, this design's choice.
// Timing: one shift per rising clk edge. After the pulse train (SUB_LEN*STEP_PS
// + WIDTH_PS after the edge) q holds din from that cycle in q[0] and every
// other bit moved up by one; q is therefore valid from then until the next
// edge. The pulse generator is a behavioural delay model, so the top as a
// whole is for simulation; the latch array itself is synthesizable.
module pulsed_latch_shift_register #(
  parameter int unsigned WORD_LEN = pl_shift_pkg::WORD_LEN,
  parameter int unsigned SUB_LEN  = pl_shift_pkg::SUB_LEN,
  parameter int unsigned STEP_PS  = pl_shift_pkg::PULSE_STEP_PS,
  parameter int unsigned WIDTH_PS = pl_shift_pkg::PULSE_WIDTH_PS
) (
  input  logic                clk,
  input  logic                din,
  output logic [WORD_LEN-1:0] q,
  output logic                dout
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NSUB = WORD_LEN / SUB_LEN;

  initial begin
    assert (WORD_LEN % SUB_LEN == 0 && NSUB > 0)
      else $error("pulsed_latch_shift_register: WORD_LEN %0d is not a multiple of SUB_LEN %0d",
                  WORD_LEN, SUB_LEN);
  end

  logic [SUB_LEN:0] clk_pulse;

  // t/tb of sub-shift register k feed sub-shift register k+1; entry 0 is the
  // serial input
  logic [NSUB:0] link;
  logic [NSUB:0] linkb;

  delayed_pulse_gen #(
    .SUB_LEN (SUB_LEN),
    .STEP_PS (STEP_PS),
    .WIDTH_PS(WIDTH_PS)
  ) u_pgen (
    .clk      (clk),
    .clk_pulse(clk_pulse)
  );

  assign link[0]  = din;
  assign linkb[0] = ~din;

  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    sub_shift_register #(.SUB_LEN(SUB_LEN)) u_sub (
      .clk_pulse(clk_pulse),
      .din      (link[k]),
      .dinb     (linkb[k]),
      .q        (q[k*SUB_LEN +: SUB_LEN]),
      .t        (link[k+1]),
      .tb       (linkb[k+1])
    );
  end

  assign dout = q[WORD_LEN-1];
endmodule
