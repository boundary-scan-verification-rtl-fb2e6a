// tb_instruction_register: checks capture, shift, update and reset of the IR.
//
// The TAP state is driven directly. Each round walks Capture-IR, eight
// Shift-IR cycles with a random opcode on TDI, and Update-IR, then checks
// that the eight bits seen on so are the capture pattern 00000001 (then the
// bits shifted in), that the instruction changes only after the falling TCK
// edge of Update-IR, and that Test-Logic-Reset restores IDCODE (8'h0C).
module tb_instruction_register;
  import jtag_pkg::*;

  logic tck = 1'b0;
  logic trst_n = 1'b0;
  logic tdi = 1'b0;
  tap_state_e state = TLR;
  logic so;
  logic [7:0] instr;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  instruction_register dut (.tck, .trst_n, .state, .tdi, .so, .instr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr=%h)", what, instr); end
  endtask

  // Spend one full TCK cycle in state s (set just after a falling edge).
  task automatic step(tap_state_e s);
    state = s;
    @(posedge tck);
    @(negedge tck);
    #1;
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] op, seen, prev;
    #12 trst_n = 1'b1;
    check(instr == 8'h0C, "reset to IDCODE");
    @(negedge tck); #1;
    prev = 8'h0C;
    for (int r = 0; r < 40; r++) begin
      op = 8'($urandom);
      step(RTI);
      step(CAPTURE_IR);
      for (int b = 0; b < 8; b++) begin
        seen[b] = so;      // bit leaving towards TDO before this shift
        tdi = op[b];
        step(SHIFT_IR);
      end
      check(seen == 8'h01, $sformatf("captured pattern %h", seen));
      state = EXIT1_IR;
      check(instr == prev, "holds during Shift-IR");
      step(EXIT1_IR);
      state = UPDATE_IR;
      @(posedge tck); #1 check(instr == prev, "no change on rising edge of Update-IR");
      @(negedge tck); #1 check(instr == op, "loaded on falling edge of Update-IR");
      check(so == op[0], "shift stage holds shifted opcode");
      prev = op;
    end
    step(PAUSE_IR); step(PAUSE_IR);
    check(so == prev[0] && instr == prev, "Pause-IR holds");
    step(TLR);
    check(instr == 8'h0C, "Test-Logic-Reset selects IDCODE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
