// tb_tap_controller: checks the TAP state machine against a reference table.
//
// The reference is an independent table of the 16 states in diagram order,
// giving the successor for TMS=0 and TMS=1. The bench drives random TMS for
// 3000 cycles and compares every state, checks that five TMS=1 cycles reach
// Test-Logic-Reset from every state, and that TRST_N resets at once, between
// clock edges.
module tb_tap_controller;
  import jtag_pkg::*;

  logic tck = 1'b0;
  logic trst_n = 1'b0;
  logic tms = 1'b1;
  tap_state_e state;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  tap_controller dut (.tck, .trst_n, .tms, .state);

  // Diagram order: 0 TLR, 1 RTI, 2..8 DR column, 9..15 IR column.
  tap_state_e names [16] = '{TLR, RTI, SEL_DR, CAPTURE_DR, SHIFT_DR, EXIT1_DR,
                             PAUSE_DR, EXIT2_DR, UPDATE_DR, SEL_IR, CAPTURE_IR,
                             SHIFT_IR, EXIT1_IR, PAUSE_IR, EXIT2_IR, UPDATE_IR};
  int next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int ref_idx;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state=%s expected %s", what, state.name(), names[ref_idx].name());
    end
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_idx = 0;
    #12 trst_n = 1'b1;
    check(state == names[ref_idx], "reset");
    // random walk
    for (int n = 0; n < 3000; n++) begin
      @(negedge tck);
      tms = ($urandom_range(0, 99) < 40);
      @(posedge tck);
      ref_idx = tms ? next1[ref_idx] : next0[ref_idx];
      #1 check(state == names[ref_idx], "walk");
    end
    // soft reset from every state
    for (int s = 0; s < 16; s++) begin
      // reach state s with a random path: reset then search by random walk
      @(negedge tck); trst_n = 1'b0; #1 trst_n = 1'b1; ref_idx = 0;
      while (ref_idx != s) begin
        @(negedge tck);
        tms = $urandom_range(0, 1);
        @(posedge tck);
        ref_idx = tms ? next1[ref_idx] : next0[ref_idx];
      end
      for (int k = 0; k < 5; k++) begin
        @(negedge tck); tms = 1'b1; @(posedge tck);
      end
      ref_idx = 0;
      #1 check(state == TLR, "five TMS=1");
    end
    // hard reset in the middle of a cycle, away from an edge
    @(negedge tck); tms = 1'b0; @(posedge tck); @(negedge tck); @(posedge tck);
    #2 trst_n = 1'b0;
    #1 ref_idx = 0; check(state == TLR, "TRST_N asynchronous");
    trst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
