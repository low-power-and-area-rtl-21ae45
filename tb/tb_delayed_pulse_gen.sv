// Self-checking testbench for the delayed pulsed clock generator.
// Drives a 200 MHz clock and records, per cycle, when each of the SUB_LEN+1
// outputs rises and falls. Checks: one pulse per output per cycle, CLK-pulse T
// first and then outputs SUB_LEN down to 1, start times k*STEP_PS after the
// edge, width WIDTH_PS, never two outputs high together, and the whole train
// over before the clock falls.
module tb_delayed_pulse_gen;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SUB_LEN  = pl_shift_pkg::SUB_LEN;
  localparam int unsigned STEP_PS  = pl_shift_pkg::PULSE_STEP_PS;
  localparam int unsigned WIDTH_PS = pl_shift_pkg::PULSE_WIDTH_PS;
  localparam int unsigned PERIOD   = pl_shift_pkg::CLK_PERIOD_PS;
  localparam int unsigned NCYC     = 100;

  logic             clk = 1'b0;
  logic [SUB_LEN:0] clk_pulse;
  int   checks = 0, failures = 0;
  time  t_edge = 0;
  bit   started = 1'b0;   // ignore settling of the model at time zero
  int   rises [SUB_LEN+1];
  int   falls [SUB_LEN+1];

  delayed_pulse_gen #(.SUB_LEN(SUB_LEN), .STEP_PS(STEP_PS), .WIDTH_PS(WIDTH_PS))
    dut (.clk(clk), .clk_pulse(clk_pulse));

  function automatic int slot_of(int i);
    // firing position of output i: T (i = 0) first, then SUB_LEN .. 1
    return (i == 0) ? 0 : SUB_LEN + 1 - i;
  endfunction

  initial begin
    #(PERIOD * (NCYC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin t_edge = $time; started = 1'b1; end

  for (genvar i = 0; i <= SUB_LEN; i++) begin : g_mon
    always @(posedge clk_pulse[i]) if (started) begin
      rises[i]++;
      checks++;
      if ($time - t_edge != slot_of(i) * STEP_PS) begin
        failures++;
        $display("FAIL output %0d rises %0t after the edge, expected %0d",
                 i, $time - t_edge, slot_of(i) * STEP_PS);
      end
    end
    always @(negedge clk_pulse[i]) if (started) begin
      falls[i]++;
      checks++;
      if ($time - t_edge != slot_of(i) * STEP_PS + WIDTH_PS) begin
        failures++;
        $display("FAIL output %0d falls %0t after the edge", i, $time - t_edge);
      end
    end
  end

  // non-overlap, sampled on a fine grid
  initial begin
    forever begin
      #10;
      checks++;
      if (!$onehot0(clk_pulse)) begin
        failures++;
        $display("FAIL overlapping pulses %b at %0t", clk_pulse, $time);
      end
    end
  end

  initial begin
    foreach (rises[i]) begin rises[i] = 0; falls[i] = 0; end
    #(PERIOD);
    repeat (NCYC) begin
      clk = 1'b1; #(PERIOD / 2);
      checks++;
      if (clk_pulse != '0) begin
        failures++;
        $display("FAIL pulse train still running when the clock falls");
      end
      clk = 1'b0; #(PERIOD / 2);
    end
    #(PERIOD);
    for (int i = 0; i <= SUB_LEN; i++) begin
      checks++;
      if (rises[i] != NCYC || falls[i] != NCYC) begin
        failures++;
        $display("FAIL output %0d pulsed %0d/%0d times in %0d cycles", i, rises[i], falls[i], NCYC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
