// Self-checking testbench for the clock-pulse circuit model.
// Drives a 200 MHz clock and measures every output pulse: it must start at a
// rising clock edge, last WIDTH_PS, and there must be exactly one per cycle.
module tb_clock_pulse_circuit;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WIDTH_PS = pl_shift_pkg::PULSE_WIDTH_PS;
  localparam int unsigned PERIOD   = pl_shift_pkg::CLK_PERIOD_PS;
  localparam int unsigned NCYC     = 200;

  logic clk = 1'b0;
  logic clk_pulse;
  int   checks = 0, failures = 0;
  int   npulses = 0;
  time  t_edge = 0, t_rise = 0;

  clock_pulse_circuit #(.WIDTH_PS(WIDTH_PS)) dut (.clk_in(clk), .clk_pulse(clk_pulse));

  initial begin
    #(PERIOD * (NCYC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) t_edge = $time;

  always @(posedge clk_pulse) begin
    t_rise = $time;
    checks++;
    if (t_rise != t_edge) begin
      failures++;
      $display("FAIL pulse rises at %0t, clock edge at %0t", t_rise, t_edge);
    end
  end

  always @(negedge clk_pulse) begin
    npulses++;
    checks++;
    if ($time - t_rise != WIDTH_PS) begin
      failures++;
      $display("FAIL pulse width %0t, expected %0d", $time - t_rise, WIDTH_PS);
    end
  end

  initial begin
    #(PERIOD);
    repeat (NCYC) begin
      clk = 1'b1; #(PERIOD / 2);
      clk = 1'b0; #(PERIOD / 2);
    end
    #(PERIOD);
    checks++;
    if (npulses != NCYC) begin
      failures++;
      $display("FAIL %0d pulses for %0d clock cycles", npulses, NCYC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
