// tb_hyst_memory: checks the set/clear/init flip-flop against a reference.
//
// Random set, clr, init and init_data are applied over many TCK cycles. The
// expected value follows the receiver's rules: set forces 1, clr forces 0, a
// falling TCK edge with init high loads init_data unless set or clr is still
// high, and otherwise the value holds.
module tb_hyst_memory;
  logic tck = 1'b0, set = 1'b0, clr = 1'b1, init = 1'b0, init_data = 1'b0, q;
  logic m = 1'b0;
  int checks = 0, failures = 0, n_set = 0, n_clr = 0, n_init = 0, n_over = 0;

  always #5 tck = ~tck;

  hyst_memory dut (.tck, .set, .clr, .init, .init_data, .q);

  initial begin
    repeat (10000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s at %0t: q=%b expected %b", what, $time, q, exp); end
  endtask

  // One TCK cycle per step. After the rising edge a random action is
  // applied: a set or clear pulse that ends before the falling edge, a set
  // or clear held across the falling edge, or nothing. init and init_data
  // are random. The expected value is worked out here step by step.
  initial begin
    int r;
    @(posedge tck);
    #1 clr = 1'b0;
    m = 1'b0;
    check(m, "clear at start");
    for (int n = 0; n < 1000; n++) begin
      @(posedge tck);
      #1;
      r = $urandom_range(0, 7);
      init = ($urandom_range(0, 2) == 0);
      init_data = 1'($urandom);
      if (r == 0 || r == 2) begin set = 1'b1; n_set++; m = 1'b1; end
      else if (r == 1 || r == 3) begin clr = 1'b1; n_clr++; m = 1'b0; end
      #1 check(m, "after set/clear asserted");
      if (r < 2) begin set = 1'b0; clr = 1'b0; end
      #1 check(m, "holds after pulse");
      @(negedge tck);
      // a held set or clear overrides the initialisation
      if (init && r >= 2 && r <= 3) n_over++;
      else if (init) begin m = init_data; n_init++; end
      #1 check(m, "falling edge");
      set = 1'b0; clr = 1'b0;
      #1 check(m, "holds after release");
    end
    checks++;
    if (n_set == 0 || n_clr == 0 || n_init == 0 || n_over == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
