// tb_ac_signal_gen: checks the AC test signal.
//
// Under EXTEST_TRAIN the signal must toggle on every falling TCK edge spent
// in Run-Test/Idle (N cycles give N transitions); under EXTEST_PULSE it must
// rise once and stay high; it must fall on the first falling edge outside
// Run-Test/Idle, change only on falling edges, and stay low without an AC
// instruction.
module tb_ac_signal_gen;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0, ac_mode = 1'b0, ac_train = 1'b0, ac_signal;
  tap_state_e state = TLR;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  ac_signal_gen dut (.tck, .trst_n, .state, .ac_mode, .ac_train, .ac_signal);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int transitions; logic last;
    #12 trst_n = 1'b1;
    for (int r = 0; r < 24; r++) begin
      int n;
      n = 1 + (r % 6);
      ac_mode  = (r % 3 != 2);
      ac_train = (r % 3 == 0);
      // enter Run-Test/Idle after a rising edge
      @(posedge tck); #1 state = RTI;
      transitions = 0; last = ac_signal;
      for (int k = 0; k < n; k++) begin
        @(negedge tck); #1;
        if (ac_signal != last) transitions++;
        if (ac_mode && !ac_train) check(ac_signal == 1'b1, "PULSE held high in Run-Test/Idle");
        if (!ac_mode) check(ac_signal == 1'b0, "low without AC instruction");
        last = ac_signal;
        @(posedge tck); #1 check(ac_signal == last, "no change on rising edge");
      end
      if (ac_train) check(transitions == n, $sformatf("TRAIN: %0d transitions in %0d cycles", transitions, n));
      if (ac_mode && !ac_train) check(transitions == 1, "PULSE: one transition");
      state = SEL_DR;
      @(negedge tck); #1 check(ac_signal == 1'b0, "cleared in Select-DR-Scan");
      @(posedge tck); #1 state = CAPTURE_DR;
      @(negedge tck); #1 check(ac_signal == 1'b0, "stays low outside Run-Test/Idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
