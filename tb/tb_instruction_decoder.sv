// tb_instruction_decoder: checks all 256 opcodes against the device's
// instruction table (register access and boundary controls).
module tb_instruction_decoder;
  import jtag_pkg::*;

  logic [7:0] instr;
  dr_sel_e dr_sel;
  logic mode_out, ac_mode, ac_train, highz;
  int checks = 0, failures = 0;

  instruction_decoder dut (.instr, .dr_sel, .mode_out, .ac_mode, .ac_train, .highz);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_sel; bit e_mode, e_ac, e_train, e_hz;
    for (int op = 0; op < 256; op++) begin
      instr = 8'(op);
      #1;
      e_sel = 0; e_mode = 0; e_ac = 0; e_train = 0; e_hz = 0;
      if (op == 'h01) e_sel = 2;
      if (op == 'h09) begin e_sel = 2; e_mode = 1; end
      if (op == 'h0E) begin e_sel = 2; e_mode = 1; e_ac = 1; end
      if (op == 'h0F) begin e_sel = 2; e_mode = 1; e_ac = 1; e_train = 1; end
      if (op == 'h0C) e_sel = 1;
      if (op == 'h04) e_mode = 1;
      if (op == 'h08) e_hz = 1;
      checks++;
      if (int'(dr_sel) != e_sel || mode_out != e_mode || ac_mode != e_ac ||
          ac_train != e_train || highz != e_hz) begin
        failures++;
        $display("FAIL opcode %h: sel=%0d mode=%b ac=%b train=%b hz=%b", op, dr_sel,
                 mode_out, ac_mode, ac_train, highz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
