// instruction_register: the 8-bit instruction register (IR) of the TAP.
//
// It has a shift stage and a parallel hold stage. On the rising TCK edge in
// Capture-IR the shift stage loads the fixed pattern 00000001 (two LSBs "01");
// in Shift-IR it shifts right, TDI entering at the MSB and the LSB appearing
// on so (towards TDO). On the falling TCK edge in Update-IR the hold stage
// takes the shift stage and becomes the current instruction. In
// Test-Logic-Reset (or on TRST_N low) the hold stage is set to IDCODE, the
// device's default instruction. In all other states both stages hold.
// Clearing the shift stage on reset is this design's choice (the standard
// leaves it undefined).
module instruction_register
  import jtag_pkg::*;
#(
  parameter int unsigned LEN        = IR_LEN,
  parameter logic [LEN-1:0] CAPTURE = LEN'(IR_CAPTURE),
  parameter logic [LEN-1:0] RESET_OP = LEN'(OP_IDCODE)
) (
  input  logic           tck,
  input  logic           trst_n,
  input  tap_state_e     state,
  input  logic           tdi,
  output logic           so,          // shift-stage LSB, towards TDO
  output logic [LEN-1:0] instr        // current (decoded) instruction
);

  logic [LEN-1:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) sr <= '0;
    else if (state == CAPTURE_IR) sr <= CAPTURE;
    else if (state == SHIFT_IR)   sr <= {tdi, sr[LEN-1:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)                 instr <= RESET_OP;
    else if (state == TLR)       instr <= RESET_OP;
    else if (state == UPDATE_IR) instr <= sr;
  end

  assign so = sr[0];

endmodule
