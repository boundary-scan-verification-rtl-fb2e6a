// bypass_register: the one-bit bypass register.
//
// When selected (sel high), it loads a fixed 0 on the rising TCK edge in
// Capture-DR and takes TDI on each rising edge in Shift-DR, so a selected
// device adds exactly one bit of delay to the board scan path. so is the
// register's output towards TDO. It is cleared by TRST_N, a choice of this
// design.
module bypass_register
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  tap_state_e state,
  input  logic       sel,
  input  logic       tdi,
  output logic       so
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) so <= 1'b0;
    else if (sel && state == CAPTURE_DR) so <= 1'b0;
    else if (sel && state == SHIFT_DR)   so <= tdi;
  end

endmodule
