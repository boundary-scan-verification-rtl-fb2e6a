// ac_signal_gen: generates the AC test signal for the 1149.6 output cells.
//
// The signal changes only on falling TCK edges. While the TAP is in
// Run-Test/Idle under an AC EXTEST instruction it toggles every TCK cycle
// for EXTEST_TRAIN (so the number of Run-Test/Idle cycles sets the number of
// transitions) and is held high for EXTEST_PULSE (one inverted pulse for as
// long as the TAP stays in Run-Test/Idle). In every other state it is low,
// so the drivers return to non-inverted data once the TAP leaves
// Run-Test/Idle for Select-DR-Scan, and an AC instruction that never visits
// Run-Test/Idle behaves as EXTEST. That the signal starts high on the first
// falling edge in Run-Test/Idle is this design's choice.
module ac_signal_gen
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  tap_state_e state,
  input  logic       ac_mode,   // EXTEST_PULSE or EXTEST_TRAIN in effect
  input  logic       ac_train,  // EXTEST_TRAIN
  output logic       ac_signal
);

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)                      ac_signal <= 1'b0;
    else if (ac_mode && state == RTI) ac_signal <= ac_train ? ~ac_signal : 1'b1;
    else                              ac_signal <= 1'b0;
  end

endmodule
