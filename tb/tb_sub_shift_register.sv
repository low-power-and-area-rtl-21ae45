// Self-checking testbench for one sub-shift register.
// The testbench makes the pulsed clocks itself, in the published order
// (T, then Q{SUB_LEN} down to Q1, never overlapping), shifts random serial
// data in, and after every cycle compares Q1..Q{SUB_LEN} and the temporary
// latch T with a reference shift register. The serial input is changed
// between pulses to show that a latch only takes what is present during its
// own pulse. A watchdog ends the run.
module tb_sub_shift_register;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SUB_LEN = pl_shift_pkg::SUB_LEN;
  localparam int unsigned NCYC    = 400;

  logic [SUB_LEN:0]   clk_pulse = '0;
  logic               din = 1'b0;
  logic [SUB_LEN-1:0] q;
  logic               t, tb;
  logic [SUB_LEN-1:0] ref_q;
  logic               ref_t;
  int   checks = 0, failures = 0;
  int   filled = 0;

  sub_shift_register #(.SUB_LEN(SUB_LEN)) dut (
    .clk_pulse(clk_pulse), .din(din), .dinb(~din), .q(q), .t(t), .tb(tb));

  task automatic pulse(int i);
    clk_pulse[i] = 1'b1; #100;
    clk_pulse[i] = 1'b0; #100;
  endtask

  initial begin
    #(2000 * NCYC + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0; ref_t = 1'b0;
    #100;
    for (int c = 0; c < NCYC; c++) begin
      logic bit_in;
      bit_in = 1'($urandom);
      din = bit_in;
      // reference: T takes the last bit, the rest shift by one
      ref_t = ref_q[SUB_LEN-1];
      ref_q = {ref_q[SUB_LEN-2:0], bit_in};
      pulse(0);
      for (int i = SUB_LEN; i >= 1; i--) begin
        if (i == 1) din = bit_in;
        else        din = 1'($urandom);   // noise while Q1 is closed
        pulse(i);
      end
      din = ~bit_in;                       // change after the last pulse
      #100;
      if (filled < SUB_LEN + 1) filled++;
      for (int i = 0; i < SUB_LEN; i++) begin
        if (i < filled) begin
          checks++;
          if (q[i] !== ref_q[i]) begin
            failures++;
            $display("FAIL cycle %0d: Q%0d = %b, expected %b", c, i + 1, q[i], ref_q[i]);
          end
        end
      end
      if (filled > SUB_LEN) begin
        checks++;
        if (t !== ref_t || tb !== ~ref_t) begin
          failures++;
          $display("FAIL cycle %0d: T = %b/%b, expected %b", c, t, tb, ref_t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
