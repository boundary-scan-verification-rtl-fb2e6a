// tb_rx_comparator: checks the receiver front-end model.
//
// DC mode: set equals the pad level and clr its complement at all times.
// AC mode: a rising pad edge gives one set pulse and a falling edge one clr
// pulse, each one filter delay long; a steady pad gives no pulse at all.
module tb_rx_comparator;
  logic pad = 1'b0, ac_mode = 1'b0, set, clr;
  int checks = 0, failures = 0;

  rx_comparator dut (.pad, .ac_mode, .set, .clr);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    for (int n = 0; n < 50; n++) begin
      pad = 1'($urandom);
      #0.5 check(set == pad && clr == !pad, "DC level");
      #3;
    end
    ac_mode = 1'b1;
    pad = 1'b0;
    #5;
    for (int n = 0; n < 50; n++) begin
      logic rising;
      rising = !pad;
      pad = !pad;
      #0.5 check(set == rising && clr == !rising, "pulse right after the edge");
      #1 check(!set && !clr, "pulse over after the filter delay");
      #5 check(!set && !clr, "steady level gives no pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
