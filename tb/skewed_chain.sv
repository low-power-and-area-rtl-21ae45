// Test helper: a short pulsed-latch shift register whose pulsed clocks reach
// each sub-shift register through a wire with skew.
//
// Sub-shift register k receives every pulse k*SKEW_PS later than
// sub-shift register 0, the way the skew grows with wire distance from the
// generator. Within one sub-shift register, each pulse also gets its own small
// extra delay below STEP_PS - WIDTH_PS, so the pulses of that sub-register
// still arrive in order and never overlap. The model is for simulation only.
//
// Interface: pulses from a delayed_pulse_gen, serial input din, parallel
// content q (q[0] newest), and q1_pulse[k], the skewed last pulse of
// sub-shift register k, after whose fall that sub-register holds the new data.
module skewed_chain #(
  parameter int unsigned NSUB     = 4,
  parameter int unsigned SUB_LEN  = pl_shift_pkg::SUB_LEN,
  parameter int unsigned SKEW_PS  = 0,
  parameter int unsigned STEP_PS  = pl_shift_pkg::PULSE_STEP_PS,
  parameter int unsigned WIDTH_PS = pl_shift_pkg::PULSE_WIDTH_PS
) (
  input  logic [SUB_LEN:0]         clk_pulse,
  input  logic                     din,
  output logic [NSUB*SUB_LEN-1:0]  q,
  output logic [NSUB-1:0]          q1_pulse
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SEG_PS = 200;   // longest delay of one wire segment

  logic [NSUB:0] link, linkb;
  assign link[0]  = din;
  assign linkb[0] = ~din;

  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    logic [SUB_LEN:0] p;
    logic [SUB_LEN:0] pd;
    for (genvar i = 0; i <= SUB_LEN; i++) begin : g_wire
      // extra in-register skew, different per pulse, below the pulse gap
      localparam int unsigned DLY = k * SKEW_PS + ((i * 37 + k * 53) % (STEP_PS - WIDTH_PS));
      // the wire is a chain of short segments, each shorter than a pulse,
      // so that a delayed pulse is never lost while an earlier edge is in flight
      localparam int unsigned NSEG = (DLY + SEG_PS - 1) / SEG_PS + 1;
      logic [NSEG:0] seg;
      assign seg[0] = clk_pulse[i];
      for (genvar s = 1; s <= NSEG; s++) begin : g_seg
        localparam int unsigned SD = DLY / NSEG + ((s <= DLY % NSEG) ? 1 : 0);
        initial seg[s] = 1'b0;
        always @(seg[s-1]) seg[s] <= #(SD) seg[s-1];
      end
      assign pd[i] = seg[NSEG];
      assign p[i] = (DLY == 0) ? clk_pulse[i] : pd[i];
    end
    assign q1_pulse[k] = p[1];
    sub_shift_register #(.SUB_LEN(SUB_LEN)) u_sub (
      .clk_pulse(p),
      .din      (link[k]),
      .dinb     (linkb[k]),
      .q        (q[k*SUB_LEN +: SUB_LEN]),
      .t        (link[k+1]),
      .tb       (linkb[k+1])
    );
  end
endmodule
