// Testbench for the tolerance of the sub-shift-register scheme to pulse skew.
//
// One delayed pulsed clock generator drives four 16-bit chains (4
// sub-shift registers each) through wires whose skew grows by SKEW_PS per
// sub-shift register: 0, 300, 1200 and 3500 ps. Each sub-register also sees
// small, different delays on its own five pulses, but never enough to reorder
// them. The scheme only needs the temporary latch of sub-register k to be
// written before, and not rewritten until after, the first latch of
// sub-register k+1 reads it: SKEW_PS + SUB_LEN*STEP_PS + WIDTH_PS (plus the
// in-register spread) must stay below one clock period. Each sub-register is
// checked right after its own last pulse against the reference content of the
// cycle that pulse belongs to. The first three chains meet the rule and must
// always match; the last breaks it and must show corrupted data. A watchdog
// ends the run.
module tb_pulse_skew;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SUB_LEN = pl_shift_pkg::SUB_LEN;
  localparam int unsigned PERIOD  = pl_shift_pkg::CLK_PERIOD_PS;
  localparam int unsigned NSUB    = 4;
  localparam int unsigned LEN     = NSUB * SUB_LEN;
  localparam int unsigned NCYC    = 120;
  localparam int unsigned NCH     = 4;
  localparam int unsigned SKEW [NCH] = '{0, 300, 1200, 3500};

  logic             clk = 1'b0;
  logic             din = 1'b0;
  bit               started = 1'b0;
  logic [SUB_LEN:0] clk_pulse;
  logic [LEN-1:0]   qs [NCH];
  logic [NSUB-1:0]  q1p [NCH];
  logic [LEN-1:0]   ref_q = '0;
  logic [LEN-1:0]   ref_hist [$];
  int   checks = 0, failures = 0;
  int   good [NCH];
  int   bad  [NCH];
  int   ntrain [NCH][NSUB];

  delayed_pulse_gen u_gen (.clk(clk), .clk_pulse(clk_pulse));

  skewed_chain #(.NSUB(NSUB), .SKEW_PS(SKEW[0])) u_c0 (.clk_pulse(clk_pulse), .din(din), .q(qs[0]), .q1_pulse(q1p[0]));
  skewed_chain #(.NSUB(NSUB), .SKEW_PS(SKEW[1])) u_c1 (.clk_pulse(clk_pulse), .din(din), .q(qs[1]), .q1_pulse(q1p[1]));
  skewed_chain #(.NSUB(NSUB), .SKEW_PS(SKEW[2])) u_c2 (.clk_pulse(clk_pulse), .din(din), .q(qs[2]), .q1_pulse(q1p[2]));
  skewed_chain #(.NSUB(NSUB), .SKEW_PS(SKEW[3])) u_c3 (.clk_pulse(clk_pulse), .din(din), .q(qs[3]), .q1_pulse(q1p[3]));

  // compare sub-register k of chain ch after its own last pulse of a cycle
  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    for (genvar k = 0; k < NSUB; k++) begin : g_k
      // edges before the first clock edge are the wires settling from power-up
      always @(negedge q1p[ch][k]) if (started) begin
        int c;
        c = ntrain[ch][k];
        ntrain[ch][k]++;
        if (c >= int'(LEN) && c < ref_hist.size()) begin
          if (qs[ch][k*SUB_LEN +: SUB_LEN] === ref_hist[c][k*SUB_LEN +: SUB_LEN]) good[ch]++;
          else bad[ch]++;
        end
      end
    end
  end

  initial begin
    #(PERIOD * (NCYC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (good[ch]) begin
      good[ch] = 0; bad[ch] = 0;
      for (int k = 0; k < int'(NSUB); k++) ntrain[ch][k] = 0;
    end
    #(PERIOD);
    for (int c = 0; c < NCYC; c++) begin
      logic b;
      b = 1'($urandom);
      ref_q = {ref_q[LEN-2:0], b};
      ref_hist.push_back(ref_q);
      clk = 1'b1;
      started = 1'b1;
      #1 din = b;
      #(PERIOD / 2 - 1);
      clk = 1'b0;
      #(PERIOD / 2);
    end
    #(4 * PERIOD);
    for (int ch = 0; ch < int'(NCH); ch++) begin
      $display("skew %0d ps per sub-register: %0d sub-register checks matched, %0d did not",
               SKEW[ch], good[ch], bad[ch]);
      checks++;
      if (ch < 3) begin
        if (bad[ch] != 0 || good[ch] == 0) begin
          failures++;
          $display("FAIL skew %0d ps should be tolerated", SKEW[ch]);
        end
        checks += good[ch];
        failures += bad[ch];
      end else if (bad[ch] == 0) begin
        failures++;
        $display("FAIL skew %0d ps breaks the timing rule but the data stayed correct", SKEW[ch]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
