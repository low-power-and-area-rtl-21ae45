// End-to-end testbench for the pulsed-latch shift register at its default
// size (256 bits, 4-bit sub-shift registers, 200 MHz clock).
// Random serial data is shifted in for several register lengths. After each
// pulse train the whole parallel content q is compared with a reference
// shift register, and the serial output is checked to deliver each bit
// exactly WORD_LEN-1 cycles after the cycle it entered. The testbench also counts the
// mechanisms of the design: full pulse trains seen in the right order
// (T first, Q1 last), bits handed across a sub-shift-register boundary by a
// temporary latch, and changes of the serial input between pulse trains.
// Each must occur, and a watchdog ends the run.
module tb_pulsed_latch_shift_register;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WORD_LEN = pl_shift_pkg::WORD_LEN;
  localparam int unsigned SUB_LEN  = pl_shift_pkg::SUB_LEN;
  localparam int unsigned PERIOD   = pl_shift_pkg::CLK_PERIOD_PS;
  localparam int unsigned NSUB     = WORD_LEN / SUB_LEN;
  localparam int unsigned NCYC     = 3 * WORD_LEN + 50;

  logic                clk = 1'b0;
  logic                din = 1'b0;
  logic [WORD_LEN-1:0] q;
  logic                dout;

  logic [WORD_LEN-1:0] ref_q = '0;
  bit   in_hist [$];
  int   checks = 0, failures = 0;

  int   n_trains = 0;        // pulse trains in the right order
  int   n_handoffs = 0;      // bits moved across a sub-register boundary
  int   n_din_toggles = 0;   // serial input changes
  int   n_serial_out = 0;    // bits checked at dout after WORD_LEN cycles

  pulsed_latch_shift_register dut (.clk(clk), .din(din), .q(q), .dout(dout));

  // record the order in which the pulses of one cycle arrive
  int order [$];
  for (genvar i = 0; i <= SUB_LEN; i++) begin : g_mon
    always @(posedge dut.clk_pulse[i]) order.push_back(i);
  end

  initial begin
    #(PERIOD * (NCYC + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD);
    for (int c = 0; c < NCYC; c++) begin
      logic bit_in, prev;
      bit_in = 1'($urandom);
      prev   = din;
      order.delete();
      // rising edge, then the serial input is set right after it and held
      // until the clock falls, after the pulse train
      clk = 1'b1;
      #1 din = bit_in;
      if (din != prev) n_din_toggles++;
      #(PERIOD / 2 - 1);

      // reference model and checks after the pulse train
      for (int k = 1; k < NSUB; k++)
        if (ref_q[k*SUB_LEN-1] != ref_q[k*SUB_LEN] && c >= k * SUB_LEN) n_handoffs++;
      ref_q = {ref_q[WORD_LEN-2:0], bit_in};
      in_hist.push_back(bit_in);

      checks++;
      if (order.size() != SUB_LEN + 1 || order[0] != 0 || order[SUB_LEN] != 1) begin
        failures++;
        $display("FAIL cycle %0d: pulse order %p", c, order);
      end else begin
        bit ok = 1'b1;
        for (int j = 1; j <= SUB_LEN; j++) if (order[j] != SUB_LEN + 1 - j) ok = 1'b0;
        if (ok) n_trains++;
      end

      for (int i = 0; i < WORD_LEN; i++) begin
        if (i <= c) begin
          checks++;
          if (q[i] !== ref_q[i]) begin
            failures++;
            if (failures < 20)
              $display("FAIL cycle %0d: q[%0d] = %b, expected %b", c, i, q[i], ref_q[i]);
          end
        end
      end
      // the bit that entered WORD_LEN-1 cycles ago is now at the serial output
      if (c >= WORD_LEN - 1) begin
        checks++;
        n_serial_out++;
        if (dout !== in_hist[c - (WORD_LEN - 1)]) begin
          failures++;
          $display("FAIL cycle %0d: dout = %b, expected the bit from cycle %0d",
                   c, dout, c - (WORD_LEN - 1));
        end
      end
      clk = 1'b0;
      #(PERIOD / 2);
    end

    $display("pulse trains in order: %0d, boundary hand-offs: %0d, input changes: %0d, serial bits out: %0d",
             n_trains, n_handoffs, n_din_toggles, n_serial_out);
    checks++; if (n_trains != NCYC)  begin failures++; $display("FAIL pulse trains %0d of %0d", n_trains, NCYC); end
    checks++; if (n_handoffs == 0)   begin failures++; $display("FAIL no boundary hand-off seen"); end
    checks++; if (n_din_toggles == 0) begin failures++; $display("FAIL serial input never changed"); end
    checks++; if (n_serial_out == 0) begin failures++; $display("FAIL no bit reached the serial output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
