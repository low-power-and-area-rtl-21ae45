// Self-checking testbench for the modified SSASPL pulsed latch.
// Walks the latch through random sequences of pulse and data changes and
// compares q/qb with a reference: transparent while the pulse is high and
// the input is differential, holding otherwise. A watchdog ends the run.
module tb_modified_ssaspl;
  timeunit 1ps; timeprecision 1ps;

  logic clk_pulse, d, db, q, qb;
  logic ref_q;
  int   checks = 0, failures = 0;

  modified_ssaspl dut (.clk_pulse(clk_pulse), .d(d), .db(db), .q(q), .qb(qb));

  task automatic check(string what);
    checks++;
    if (q !== ref_q || qb !== ~ref_q) begin
      failures++;
      $display("FAIL %s: pulse=%b d=%b db=%b q=%b qb=%b expected q=%b",
               what, clk_pulse, d, db, q, qb, ref_q);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_pulse = 1'b0; d = 1'b0; db = 1'b1;
    // load a known value: 0, then 1
    #10 clk_pulse = 1'b1; #10 clk_pulse = 1'b0; ref_q = 1'b0; #10 check("load 0");
    d = 1'b1; db = 1'b0;
    #10 check("hold while pulse low");
    #10 clk_pulse = 1'b1; ref_q = 1'b1; #10 check("transparent load 1");
    d = 1'b0; db = 1'b1; #10 ref_q = 1'b0; check("follows input during pulse");
    clk_pulse = 1'b0; #10 d = 1'b1; db = 1'b0; #10 check("holds after pulse");
    // non-differential input while open: keep the value
    d = 1'b1; db = 1'b1; clk_pulse = 1'b1; #10 check("no differential input (11)");
    d = 1'b0; db = 1'b0; #10 check("no differential input (00)");
    clk_pulse = 1'b0; #10;
    // random sequence
    for (int i = 0; i < 2000; i++) begin
      logic nd;
      logic [1:0] mode;
      nd   = 1'($urandom);
      mode = 2'($urandom);
      clk_pulse = (mode != 0);
      d  = nd;
      db = (mode == 3) ? nd : ~nd;
      #5;
      if (clk_pulse && d != db) ref_q = d;
      check("random");
      clk_pulse = 1'b0;
      #5 check("random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
