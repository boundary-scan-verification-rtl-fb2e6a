// tap_controller: the 16-state IEEE 1149.1 TAP controller.
//
// The state advances on each rising edge of TCK according to TMS, following
// the standard state diagram (Test-Logic-Reset, Run-Test/Idle, and the
// seven-state DR and IR columns). TRST_N low forces Test-Logic-Reset at once
// (hard reset); five rising TCK edges with TMS high reach it from any state
// (soft reset), which the diagram gives by construction.
//
// Interface: tck, trst_n (active-low asynchronous), tms in; the current state
// out as jtag_pkg::tap_state_e. Decoding of the state into register strobes
// is done by the users of the state, so this block holds only the FSM.
module tap_controller
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TLR:        next = tms ? TLR       : RTI;
      RTI:        next = tms ? SEL_DR    : RTI;
      SEL_DR:     next = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: next = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   next = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   next = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  next = tms ? SEL_DR    : RTI;
      SEL_IR:     next = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: next = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   next = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   next = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  next = tms ? SEL_DR    : RTI;
      default:    next = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= next;
  end

endmodule
