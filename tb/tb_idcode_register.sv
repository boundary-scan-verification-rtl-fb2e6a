// tb_idcode_register: checks that Capture-DR loads the IDCODE and that 32
// Shift-DR cycles present it LSB first (the first bit out is 1), followed by
// the bits shifted in from TDI.
module tb_idcode_register;
  import jtag_pkg::*;

  localparam logic [31:0] EXPECT = 32'h8410_8013;
  logic tck = 1'b0, trst_n = 1'b0, sel = 1'b1, tdi = 1'b0, so;
  tap_state_e state = RTI;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  idcode_register dut (.tck, .trst_n, .state, .sel, .tdi, .so);

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
    logic [31:0] in, out;
    #12 trst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      in = $urandom;
      @(negedge tck); state = CAPTURE_DR;
      @(negedge tck); state = SHIFT_DR;
      for (int b = 0; b < 64; b++) begin
        tdi = (b < 32) ? in[b] : 1'b0;
        #1 if (b < 32) out[b] = so; else begin
          checks++;
          if (so != in[b-32]) begin failures++; $display("FAIL shifted-in bit %0d", b-32); end
        end
        @(negedge tck);
      end
      check(out == EXPECT, $sformatf("IDCODE read %h", out));
      check(out[0] == 1'b1, "first bit out is 1");
      // not selected: capture is ignored
      sel = 1'b0; state = CAPTURE_DR; @(negedge tck);
      check(so == 1'b0, "ignores Capture-DR when not selected");
      sel = 1'b1; state = RTI;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
