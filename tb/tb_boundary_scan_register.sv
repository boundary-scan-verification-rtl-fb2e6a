// tb_boundary_scan_register: checks the 16-cell boundary register.
//
// The TAP state is driven directly. Each round captures random receive and
// mission values, shifts 16 random bits in while checking the 16 bits that
// come out (cell 0 first: the receive captures, then the mission transmit
// data), updates, and checks the transmit pins under mode 0 (mission data),
// mode 1 (updated data) and mode 1 with the AC test signal (inverted). It
// also checks that nothing changes when the register is not selected and
// that cap_q gives the receive cells' capture flops.
module tb_boundary_scan_register;
  import jtag_pkg::*;

  localparam int NRX = 8, NTX = 8, LEN = NRX + NTX;
  logic tck = 1'b0, trst_n = 1'b0, sel = 1'b1, tdi = 1'b0;
  logic mode_out = 1'b0, ac_mode = 1'b0, ac_signal = 1'b0;
  logic [NRX-1:0] rx_pin = '0, rx_cap = '0, core_rx, cap_q;
  logic [NTX-1:0] core_tx = '0, tx_out;
  logic so;
  tap_state_e state = RTI;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  boundary_scan_register dut (.tck, .trst_n, .state, .sel, .tdi, .mode_out, .ac_mode,
                              .ac_signal, .rx_pin, .rx_cap, .core_rx, .cap_q, .core_tx, .tx_out, .so);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(tap_state_e s);
    state = s;
    @(posedge tck);
    @(negedge tck);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LEN-1:0] shin, shout, expect_cap;
    logic [NRX-1:0] rxv; logic [NTX-1:0] txv;
    #12 trst_n = 1'b1;
    @(negedge tck); #1;
    for (int r = 0; r < 30; r++) begin
      rxv = NRX'($urandom); txv = NTX'($urandom); shin = LEN'($urandom);
      rx_cap = rxv; core_tx = txv; rx_pin = ~rxv;
      #1 check(core_rx == ~rxv, "receive pins, not the receivers, reach the core");
      step(SEL_DR);
      step(CAPTURE_DR);
      check(cap_q == rxv, "cap_q shows receive captures");
      expect_cap = {txv, rxv};
      for (int b = 0; b < LEN; b++) begin
        shout[b] = so;
        tdi = shin[b];
        step(SHIFT_DR);
      end
      check(shout == expect_cap, $sformatf("captured %h expected %h", shout, expect_cap));
      step(EXIT1_DR);
      // update happens on the falling edge of Update-DR
      mode_out = 1'b1;
      #1 check(tx_out == NTX'(0) || r > 0, "before first update");
      step(UPDATE_DR);
      check(tx_out == shin[LEN-1:NRX], $sformatf("updated %h expected %h", tx_out, shin[LEN-1:NRX]));
      mode_out = 1'b0; #1 check(tx_out == txv, "mode 0 passes mission data");
      mode_out = 1'b1; ac_mode = 1'b1; ac_signal = 1'b1;
      #1 check(tx_out == ~shin[LEN-1:NRX], "AC test signal inverts");
      ac_signal = 1'b0;
      #1 check(tx_out == shin[LEN-1:NRX], "AC test signal low: EXTEST data");
      ac_mode = 1'b0;
      // not selected: shifting and update do nothing
      sel = 1'b0; tdi = ~tdi;
      step(CAPTURE_DR); step(SHIFT_DR); step(SHIFT_DR); step(UPDATE_DR);
      check(tx_out == shin[LEN-1:NRX] && so == shin[0], "not selected holds");
      sel = 1'b1;
      step(RTI);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
