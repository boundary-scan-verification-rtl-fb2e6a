// tb_bsc_cell: checks the standard boundary scan cell.
//
// Random stimulus over many TCK cycles is compared with a small reference
// model of the two flip-flops: capture loads pi, shift loads si (shift wins),
// update copies the capture flop on the falling edge, and po selects pi or
// the update flop with mode.
module tb_bsc_cell;
  logic tck = 1'b0, trst_n = 1'b0;
  logic capture = 0, shift = 0, update = 0, mode = 0, pi = 0, si = 0;
  logic so, po;
  logic m_cap = 0, m_upd = 0;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  bsc_cell dut (.tck, .trst_n, .capture, .shift, .update, .mode, .pi, .si, .so, .po);

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
      mode = 1'($urandom); pi = 1'($urandom); si = 1'($urandom);
      @(posedge tck);
      if (shift) m_cap = si; else if (capture) m_cap = pi;
      #1;
      checks++;
      if (so != m_cap) begin failures++; $display("FAIL capture/shift at %0d", n); end
      @(negedge tck);
      if (update) m_upd = m_cap;
      #1;
      checks++;
      if (po != (mode ? m_upd : pi)) begin failures++; $display("FAIL update/mode at %0d", n); end
      // update must not change on the rising edge
      update = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
