// jtag_pkg: types and constants shared by the test access port (TAP) logic.
//
// The TAP follows IEEE 1149.1 with the 1149.6 AC extensions. This package
// holds the 16 TAP controller states, the 8-bit instruction opcodes of this
// device, and the register lengths. Opcodes, instruction length, the
// instruction capture pattern and the IDCODE value are the device's own
// (they come from its boundary scan description). The 4-bit state encoding
// is the standard's customary one and is a choice of this design.
package jtag_pkg;

  typedef enum logic [3:0] {
    TLR        = 4'hF,  // Test-Logic-Reset
    RTI        = 4'hC,  // Run-Test/Idle
    SEL_DR     = 4'h7,
    CAPTURE_DR = 4'h6,
    SHIFT_DR   = 4'h2,
    EXIT1_DR   = 4'h1,
    PAUSE_DR   = 4'h3,
    EXIT2_DR   = 4'h0,
    UPDATE_DR  = 4'h5,
    SEL_IR     = 4'h4,
    CAPTURE_IR = 4'hE,
    SHIFT_IR   = 4'hA,
    EXIT1_IR   = 4'h9,
    PAUSE_IR   = 4'hB,
    EXIT2_IR   = 4'h8,
    UPDATE_IR  = 4'hD
  } tap_state_e;

  localparam int unsigned IR_LEN = 8;

  typedef logic [IR_LEN-1:0] opcode_t;

  localparam opcode_t OP_SAMPLE       = 8'h01;  // SAMPLE and PRELOAD share it
  localparam opcode_t OP_CLAMP        = 8'h04;
  localparam opcode_t OP_HIGHZ        = 8'h08;
  localparam opcode_t OP_EXTEST       = 8'h09;
  localparam opcode_t OP_IDCODE       = 8'h0C;
  localparam opcode_t OP_EXTEST_PULSE = 8'h0E;
  localparam opcode_t OP_EXTEST_TRAIN = 8'h0F;
  localparam opcode_t OP_BYPASS       = 8'hFF;

  // Value loaded into the IR shift stage in Capture-IR (two LSBs "01").
  localparam opcode_t IR_CAPTURE = 8'h01;

  localparam logic [31:0] DEFAULT_IDCODE = 32'h8410_8013;

  // Data register placed between TDI and TDO.
  typedef enum logic [1:0] {
    DR_BYPASS   = 2'd0,
    DR_IDCODE   = 2'd1,
    DR_BOUNDARY = 2'd2
  } dr_sel_e;

endpackage
