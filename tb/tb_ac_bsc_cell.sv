// tb_ac_bsc_cell: checks the AC-capable output cell.
//
// Random stimulus is compared with a reference model: capture/shift on the
// rising edge, update on the falling edge, and the pin value mission data
// (mode 0), update flop (mode 1, ac_mode 0) or update flop inverted whenever
// the AC test signal is high (mode 1, ac_mode 1).
module tb_ac_bsc_cell;
  logic tck = 1'b0, trst_n = 1'b0;
  logic capture = 0, shift = 0, update = 0, mode = 0, ac_mode = 0, ac_signal = 0;
  logic pi = 0, si = 0, so, po;
  logic m_cap = 0, m_upd = 0, expect_po;
  int checks = 0, failures = 0, inverted = 0;

  always #5 tck = ~tck;

  ac_bsc_cell dut (.tck, .trst_n, .capture, .shift, .update, .mode, .ac_mode, .ac_signal,
                   .pi, .si, .so, .po);

  initial begin
    repeat (10000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge tck); #1;
      capture = 1'($urandom); shift = 1'($urandom); update = ($urandom_range(0, 3) == 0);
      mode = ($urandom_range(0, 3) != 0); ac_mode = 1'($urandom); ac_signal = 1'($urandom);
      pi = 1'($urandom); si = 1'($urandom);
      @(posedge tck);
      if (shift) m_cap = si; else if (capture) m_cap = pi;
      #1;
      checks++;
      if (so != m_cap) begin failures++; $display("FAIL capture/shift at %0d", n); end
      @(negedge tck);
      if (update) m_upd = m_cap;
      #1;
      expect_po = !mode ? pi : (ac_mode && ac_signal) ? ~m_upd : m_upd;
      if (mode && ac_mode && ac_signal) inverted++;
      checks++;
      if (po != expect_po) begin failures++; $display("FAIL pin value at %0d", n); end
      update = 1'b0;
    end
    checks++;
    if (inverted == 0) begin failures++; $display("FAIL AC inversion never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
