// tb_bypass_register: checks that the bypass register captures 0, delays TDI
// by one TCK in Shift-DR, and holds when not selected or outside Shift-DR.
module tb_bypass_register;
  import jtag_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0, sel = 1'b1, tdi = 1'b0, so;
  tap_state_e state = RTI;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  bypass_register dut (.tck, .trst_n, .state, .sel, .tdi, .so);

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
    logic prev;
    #12 trst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      @(negedge tck); state = SHIFT_DR; tdi = 1'b1;
      @(negedge tck); state = CAPTURE_DR;
      @(posedge tck); #1 check(so == 1'b0, "captures 0");
      @(negedge tck); state = SHIFT_DR;
      prev = 1'b0;
      for (int b = 0; b < 16; b++) begin
        tdi = 1'($urandom);
        @(posedge tck); #1 check(so == tdi, "one-bit delay");
        @(negedge tck);
      end
      prev = so;
      state = PAUSE_DR; tdi = ~prev;
      @(posedge tck); #1 check(so == prev, "holds in Pause-DR");
      @(negedge tck); sel = 1'b0; state = SHIFT_DR;
      @(posedge tck); #1 check(so == prev, "holds when not selected");
      @(negedge tck); sel = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
