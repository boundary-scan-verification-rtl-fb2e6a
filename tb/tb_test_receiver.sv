// tb_test_receiver: checks the test receiver model.
//
// In DC mode out must follow the pad level. In AC mode out must rebuild the
// driven waveform from its edges: a rising edge sets it, a falling edge
// clears it, and a falling TCK edge with init high loads init_data, so that
// a line that shows no transition reports the initial value.
module tb_test_receiver;
  logic tck = 1'b0, pad = 1'b0, ac_mode = 1'b0, init = 1'b0, init_data = 1'b0, out;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  test_receiver dut (.tck, .pad, .ac_mode, .init, .init_data, .out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pad=%b out=%b)", what, pad, out); end
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic init_to(logic v);
    @(posedge tck); #1 init = 1'b1; init_data = v;
    @(negedge tck); #1 init = 1'b0;
  endtask

  initial begin
    #3;
    // DC: level detector
    for (int n = 0; n < 50; n++) begin
      pad = 1'($urandom); #3 check(out == pad, "DC follows level");
    end
    ac_mode = 1'b1;
    for (int n = 0; n < 40; n++) begin
      logic v;
      v = 1'($urandom);
      pad = 1'($urandom);
      #2;
      init_to(v);
      #1 check(out == v, "initialised from init_data");
      // no transition on the line: init value stays
      #7 check(out == v, "no transition keeps init value");
      // rising edge sets, falling edge clears
      if (pad) begin
        pad = 1'b0; #1 check(out == 1'b0, "falling edge clears");
        pad = 1'b1; #1 check(out == 1'b1, "rising edge sets");
      end else begin
        pad = 1'b1; #1 check(out == 1'b1, "rising edge sets");
        pad = 1'b0; #1 check(out == 1'b0, "falling edge clears");
      end
      // init only on a falling TCK edge with init high
      init_data = ~out;
      @(negedge tck); #1 check(out == pad, "no init without init");
    end
    ac_mode = 1'b0; #1 check(out == pad, "back to DC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
