// instruction_decoder: turns the current instruction into register selection
// and boundary control signals.
//
// Register access follows the device description: the boundary register for
// EXTEST, SAMPLE/PRELOAD, EXTEST_PULSE and EXTEST_TRAIN; the IDCODE register
// for IDCODE; the bypass register for BYPASS, HIGHZ and CLAMP. Output cells
// drive the pins from their update flops (mode_out) under EXTEST, both AC
// EXTEST instructions and CLAMP. ac_mode selects the AC (1149.6) behaviour of
// the output cells for EXTEST_PULSE and EXTEST_TRAIN, ac_train tells the two
// apart, and highz disables the output drivers under HIGHZ. Any opcode the
// device does not define is decoded as BYPASS, as the standard requires; this
// is not spelled out for this device. Purely combinational.
module instruction_decoder
  import jtag_pkg::*;
(
  input  opcode_t instr,
  output dr_sel_e dr_sel,
  output logic    mode_out,
  output logic    ac_mode,
  output logic    ac_train,
  output logic    highz
);

  always_comb begin
    dr_sel   = DR_BYPASS;
    mode_out = 1'b0;
    ac_mode  = 1'b0;
    ac_train = 1'b0;
    highz    = 1'b0;
    unique case (instr)
      OP_SAMPLE: dr_sel = DR_BOUNDARY;
      OP_EXTEST: begin
        dr_sel   = DR_BOUNDARY;
        mode_out = 1'b1;
      end
      OP_EXTEST_PULSE: begin
        dr_sel   = DR_BOUNDARY;
        mode_out = 1'b1;
        ac_mode  = 1'b1;
      end
      OP_EXTEST_TRAIN: begin
        dr_sel   = DR_BOUNDARY;
        mode_out = 1'b1;
        ac_mode  = 1'b1;
        ac_train = 1'b1;
      end
      OP_IDCODE: dr_sel = DR_IDCODE;
      OP_CLAMP:  mode_out = 1'b1;
      OP_HIGHZ:  highz = 1'b1;
      OP_BYPASS: dr_sel = DR_BYPASS;
      default:   dr_sel = DR_BYPASS;
    endcase
  end

endmodule
