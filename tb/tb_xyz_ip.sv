// tb_xyz_ip: end-to-end test of the boundary scan logic through its pins.
//
// A small JTAG driver offers the serial-vector operations a tester uses:
// test reset, moving between the stable TAP states (Test-Logic-Reset,
// Run-Test/Idle, Pause-DR, Pause-IR) along the usual default paths, IR and
// DR scans that end in Run-Test/Idle or a pause state, and Run-Test/Idle
// cycles. TDI and TMS change after the falling TCK edge and TDO is sampled at
// the rising edge, as a tester does.
//
// The tests: hard and soft reset with an IDCODE read; the instruction
// register walking-one/walking-zero sequence (including scans resumed from
// Pause-IR without a new capture); the bypass register sequence through
// Pause-DR; SAMPLE/PRELOAD with parallel receive patterns; EXTEST driving
// the transmit pins and reading them back over a board loop from TX to RX;
// EXTEST_TRAIN and EXTEST_PULSE with the transmit pins checked on every
// falling edge in Run-Test/Idle; the AC test receiver telling a connected
// line from an open one; HIGHZ, CLAMP, explicit IDCODE, an undefined
// opcode, and an IDCODE read with the wrong opcode 02 (bypass, not the ID). Each mechanism is counted and one that never happens is a failure.
// Expected values are worked out here from the instruction set and the
// boundary register layout (cells 0-7 receive pins, 8-15 transmit pins).
module tb_xyz_ip;
  import jtag_pkg::*;

  localparam real HALF = 12.5;   // 40 MHz TCK
  localparam logic [31:0] ID = 32'h8410_8013;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b1, trst_n = 1'b1;
  logic tdo, tdo_en;
  logic [7:0] rx_pad, core_rx, core_tx, tx_pad, tx_oe;
  logic [7:0] pio_rx = 8'h00;
  logic loopback = 1'b0;
  int checks = 0, failures = 0;

  always #(HALF) tck = ~tck;

  // Board: a receive pin sees either the tester's pattern or, with the loop
  // closed, the transmit pin of the same index.
  assign rx_pad = loopback ? tx_pad : pio_rx;

  xyz_ip dut (.tck, .tms, .tdi, .trst_n, .tdo, .tdo_en, .rx_pad, .core_rx, .core_tx,
              .tx_pad, .tx_oe);

  typedef enum {S_RESET, S_IDLE, S_DRPAUSE, S_IRPAUSE} stable_e;
  stable_e cur = S_RESET;

  // mechanism counters
  int n_hard_reset, n_soft_reset, n_idcode_read, n_ir_pause_resume, n_dr_pause_resume;
  int n_bypass, n_sample, n_preload, n_extest, n_interconnect, n_train_toggle;
  int n_pulse, n_open_line, n_highz, n_clamp, n_unknown_op, n_tdo_en;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One TCK cycle; returns TDO as sampled at the rising edge.
  task automatic clk(logic m, logic d, output logic o);
    tms = m; tdi = d;
    @(posedge tck); o = tdo;
    @(negedge tck); #1;
  endtask

  task automatic tmsseq(string bits);
    logic o;
    foreach (bits[i]) clk(bits[i] == "1", 1'b1, o);
  endtask

  task automatic go(stable_e to);
    if (to == S_RESET) begin tmsseq("11111"); cur = S_RESET; return; end
    case (cur)
      S_RESET:   tmsseq("0");
      S_DRPAUSE, S_IRPAUSE: tmsseq("110");
      default: ;
    endcase
    cur = S_IDLE;
    case (to)
      S_DRPAUSE: tmsseq("1010");      // Select-DR, Capture-DR, Exit1-DR, Pause-DR
      S_IRPAUSE: tmsseq("11010");     // ... Capture-IR, Exit1-IR, Pause-IR
      default: ;
    endcase
    cur = to;
  endtask

  task automatic runtest(int n);
    logic o;
    go(S_IDLE);
    repeat (n) clk(1'b0, 1'b1, o);
  endtask

  // IR (ir=1) or DR scan of len bits, LSB first; ends in Run-Test/Idle or
  // the pause state of the same column.
  task automatic scan(bit ir, int len, logic [63:0] din, output logic [63:0] dout,
                      input stable_e endst);
    logic o;
    dout = '0;
    if (ir) begin
      case (cur)
        S_IRPAUSE: begin tmsseq("10"); n_ir_pause_resume++; end
        S_DRPAUSE: tmsseq("111100");
        S_RESET:   tmsseq("01100");
        default:   tmsseq("1100");
      endcase
    end else begin
      case (cur)
        S_DRPAUSE: begin tmsseq("10"); n_dr_pause_resume++; end
        S_IRPAUSE: tmsseq("11100");
        S_RESET:   tmsseq("0100");
        default:   tmsseq("100");
      endcase
    end
    for (int i = 0; i < len; i++) begin
      clk(i == len - 1, din[i], o);
      dout[i] = o;
      if (tdo_en) n_tdo_en++;
    end
    if (endst == S_IDLE) begin tmsseq("10"); cur = S_IDLE; end
    else begin tmsseq("0"); cur = ir ? S_IRPAUSE : S_DRPAUSE; end
  endtask

  task automatic sir(logic [7:0] din, logic [7:0] expect_tdo, stable_e endst = S_IDLE);
    logic [63:0] o;
    scan(1'b1, 8, 64'(din), o, endst);
    check(o[7:0] == expect_tdo, $sformatf("SIR %h: TDO %h expected %h", din, o[7:0], expect_tdo));
  endtask

  task automatic sdr(int len, logic [63:0] din, logic [63:0] expect_tdo, logic [63:0] mask,
                     stable_e endst = S_IDLE);
    logic [63:0] o;
    scan(1'b0, len, din, o, endst);
    check((o & mask) == (expect_tdo & mask),
          $sformatf("SDR %0d %h: TDO %h expected %h mask %h", len, din, o, expect_tdo, mask));
  endtask

  task automatic hard_reset();
    @(negedge tck); #2 trst_n = 1'b0; #5 trst_n = 1'b1;
    cur = S_RESET;
    n_hard_reset++;
  endtask

  initial begin
    logic [15:0] p1, p2;
    logic [7:0] last_tx;
    int toggles;

    core_tx = 8'h3C;
    #1 trst_n = 1'b0;
    #30 trst_n = 1'b1;
    @(negedge tck); #1;

    // ---- test logic reset: hard reset, IDCODE, SAMPLE, soft reset, IDCODE
    hard_reset();
    check(dut.u_tap.state == TLR, "TRST reaches Test-Logic-Reset");
    sdr(32, 0, 64'(ID), 64'hFFFF_FFFF); n_idcode_read++;
    sir(8'h01, 8'h01);
    sdr(1, 0, 0, 0);   // a DR scan under SAMPLE: boundary register is selected
    check(dut.u_ir.instr == OP_SAMPLE, "SAMPLE loaded");
    go(S_RESET); n_soft_reset++;
    check(dut.u_ir.instr == OP_IDCODE, "soft reset restores IDCODE");
    go(S_IDLE);
    sdr(32, 0, 64'(ID), 64'hFFFF_FFFF); n_idcode_read++;
    // soft reset from the middle of a DR scan
    sir(8'hFF, 8'h01);
    go(S_DRPAUSE);
    go(S_RESET); n_soft_reset++;
    check(dut.u_tap.state == TLR && dut.u_ir.instr == OP_IDCODE, "soft reset from Pause-DR");

    // ---- instruction register test
    hard_reset();
    go(S_IRPAUSE);
    check(dut.u_tap.state == PAUSE_IR, "Idle->Select-DR->Select-IR->Capture-IR->Exit1-IR->Pause-IR");
    sir(8'h01, 8'h01, S_IRPAUSE);
    sir(8'hFE, 8'h01, S_IRPAUSE);
    sir(8'hFF, 8'hFE, S_IDLE);
    check(dut.u_ir.instr == OP_BYPASS, "IR ends with BYPASS");

    // ---- bypass register test
    hard_reset();
    go(S_IDLE);
    sir(8'hFF, 8'h01);
    go(S_DRPAUSE);
    sdr(1, 1, 0, 1, S_DRPAUSE);
    sdr(1, 0, 1, 1, S_DRPAUSE);
    sdr(1, 1, 0, 1, S_IDLE);
    // several bits through the one-bit register: delayed by one
    sdr(8, 64'hA5, 64'h4A, 64'hFF);
    n_bypass++;

    // ---- sample test: capture receive pins and mission transmit data
    hard_reset();
    go(S_IDLE);
    sir(8'h01, 8'h01);
    sdr(16, 64'h44AA, 0, 0);
    pio_rx = 8'b1010_1010;
    runtest(1);
    check(tx_pad == core_tx && tx_oe == 8'hFF, "SAMPLE leaves the pins to the core");
    check(core_rx == pio_rx, "receive pins reach the core");
    sdr(16, 64'h1155, {48'b0, core_tx, 8'hAA}, 64'hFFFF); n_sample++;
    pio_rx = 8'b0101_0101;
    core_tx = 8'hC3;
    runtest(1);
    sdr(16, 64'h0000, {48'b0, 8'hC3, 8'h55}, 64'hFFFF); n_sample++;
    pio_rx = 8'h00;

    // ---- extest test: preload, then drive the pins; board loop TX->RX
    hard_reset();
    p1 = 16'h55AA; p2 = 16'hAA55;
    go(S_IDLE);
    sir(8'h01, 8'h01);
    sdr(16, 64'(p1), 0, 0);
    check(tx_pad == core_tx, "PRELOAD does not disturb the pins"); n_preload++;
    check(dut.u_bsr.g_tx[0].u_cell.upd_q == p1[8], "PRELOAD fills the update stage");
    sir(8'h09, 8'h01);
    check(tx_pad == p1[15:8], $sformatf("EXTEST drives preloaded data %h", tx_pad)); n_extest++;
    loopback = 1'b1;
    runtest(1);
    sdr(16, 64'(p2), {48'b0, core_tx, p1[15:8]}, 64'hFFFF); n_interconnect++;
    check(tx_pad == p2[15:8], "EXTEST drives new data after Update-DR"); n_extest++;
    sdr(16, 64'h0, {48'b0, core_tx, p2[15:8]}, 64'hFFFF); n_interconnect++;
    loopback = 1'b0;

    // ---- extest_train: preload, then transmit pins toggle each falling
    //      edge in Run-Test/Idle
    hard_reset();
    go(S_IDLE);
    sir(8'h01, 8'h01);
    sdr(16, 64'h44AA, 0, 0);
    sir(8'h0F, 8'h01, S_IRPAUSE);
    go(S_IDLE);   // Exit2-IR, Update-IR, Run-Test/Idle
    check(dut.u_dec.ac_mode == 1'b1, "AC test mode under EXTEST_TRAIN");
    last_tx = tx_pad;
    toggles = 0;
    for (int k = 0; k < 3; k++) begin
      logic o;
      clk(1'b0, 1'b1, o);
      check(tx_pad == ~last_tx, $sformatf("TRAIN toggle %0d: %h after %h", k, tx_pad, last_tx));
      if (tx_pad == ~last_tx) n_train_toggle++;
      last_tx = tx_pad;
    end
    tmsseq("1");  // Select-DR-Scan
    check(tx_pad == 8'h44, "TRAIN returns to non-inverted data outside Run-Test/Idle");
    tmsseq("010"); cur = S_DRPAUSE;   // Capture-DR, Exit1-DR, Pause-DR
    sdr(16, 64'h1155, {48'b0, core_tx, 8'h00}, 64'hFF00);
    check(tx_pad == ~8'h11, "TRAIN: new data, inverted on the first Run-Test/Idle edge");

    // ---- extest_pulse: one inverted pulse for the whole Run-Test/Idle stay
    hard_reset();
    go(S_IDLE);
    sir(8'h01, 8'h01);
    sdr(16, 64'h0F00, 0, 0);
    sir(8'h0E, 8'h01, S_IRPAUSE);
    go(S_IDLE);
    for (int k = 0; k < 4; k++) begin
      logic o;
      clk(1'b0, 1'b1, o);
      check(tx_pad == 8'hF0, "PULSE holds inverted data in Run-Test/Idle");
    end
    n_pulse++;
    tmsseq("1");
    check(tx_pad == 8'h0F, "PULSE ends on leaving Run-Test/Idle");
    tmsseq("010"); cur = S_DRPAUSE;

    // ---- AC receiver: connected line versus open line under EXTEST_PULSE.
    //      Receive cells are loaded with the complement of what the line
    //      carries; that value initialises the receivers in Exit1-DR.
    loopback = 1'b1;
    go(S_IDLE);
    sdr(16, {48'b0, 8'h0F, 8'hF0}, 0, 0);   // update: drive 0F; init receivers to F0
    runtest(2);                              // pulse: edges reach the receivers
    sdr(16, {48'b0, 8'h0F, 8'hF0}, {48'b0, core_tx, 8'h0F}, 64'hFFFF);
    n_interconnect++;
    loopback = 1'b0;
    pio_rx = 8'h0F;                          // line stuck, no transitions
    sdr(16, {48'b0, 8'h0F, 8'hF0}, 0, 0);   // initialise receivers to F0 again
    runtest(2);
    sdr(16, {48'b0, 8'h0F, 8'hF0}, {48'b0, core_tx, 8'hF0}, 64'hFFFF);
    n_open_line++;
    pio_rx = 8'h00;

    // ---- HIGHZ, CLAMP, IDCODE, undefined opcode
    hard_reset();
    go(S_IDLE);
    sir(8'h08, 8'h01);
    check(tx_oe == 8'h00, "HIGHZ disables the drivers"); n_highz++;
    sdr(2, 64'b01, 64'b10, 64'b11);          // bypass selected
    sir(8'h01, 8'h01);
    check(tx_oe == 8'hFF, "drivers back on after HIGHZ");
    sdr(16, 64'h9900, 0, 0);
    check(tx_pad == core_tx, "pins still in mission mode after PRELOAD");
    sir(8'h04, 8'h01);
    check(tx_pad == 8'h99 && tx_oe == 8'hFF, "CLAMP drives preloaded data"); n_clamp++;
    sdr(2, 64'b11, 64'b10, 64'b11);          // bypass selected under CLAMP
    sir(8'h0C, 8'h01);
    check(tx_pad == core_tx, "IDCODE releases the pins");
    sdr(32, 0, 64'(ID), 64'hFFFF_FFFF); n_idcode_read++;
    sir(8'h55, 8'h01);
    sdr(3, 64'b101, 64'b010, 64'b111); n_unknown_op++;
    // a device description with the wrong IDCODE opcode (02): the 32-bit
    // read-out with TDI held high returns the bypass 0 and then all ones,
    // not the identification code
    sir(8'h02, 8'h01);
    sdr(32, 64'hFFFF_FFFF, 64'hFFFF_FFFE, 64'hFFFF_FFFF); n_unknown_op++;
    check(32'hFFFF_FFFE != ID, "wrong opcode read-out differs from the IDCODE");
    check(tdo_en == 1'b0, "TDO disabled outside shifting");

    // ---- coverage of the mechanisms
    check(n_hard_reset > 0, "hard reset");
    check(n_soft_reset > 0, "soft reset");
    check(n_idcode_read > 0, "IDCODE read");
    check(n_ir_pause_resume > 0, "IR scan resumed from Pause-IR");
    check(n_dr_pause_resume > 0, "DR scan resumed from Pause-DR");
    check(n_bypass > 0, "bypass");
    check(n_sample > 0, "SAMPLE");
    check(n_preload > 0, "PRELOAD");
    check(n_extest > 0, "EXTEST");
    check(n_interconnect > 0, "interconnect loop");
    check(n_train_toggle > 0, "EXTEST_TRAIN toggles");
    check(n_pulse > 0, "EXTEST_PULSE");
    check(n_open_line > 0, "open line detected by AC receiver");
    check(n_highz > 0, "HIGHZ");
    check(n_clamp > 0, "CLAMP");
    check(n_unknown_op > 0, "undefined opcode as BYPASS");
    check(n_tdo_en > 0, "TDO enabled while shifting");
    $display("mechanisms: hard_reset=%0d soft_reset=%0d idcode=%0d ir_pause=%0d dr_pause=%0d bypass=%0d",
             n_hard_reset, n_soft_reset, n_idcode_read, n_ir_pause_resume, n_dr_pause_resume, n_bypass);
    $display("mechanisms: sample=%0d preload=%0d extest=%0d interconnect=%0d train_toggles=%0d pulse=%0d",
             n_sample, n_preload, n_extest, n_interconnect, n_train_toggle, n_pulse);
    $display("mechanisms: open_line=%0d highz=%0d clamp=%0d unknown_op=%0d tdo_en_bits=%0d",
             n_open_line, n_highz, n_clamp, n_unknown_op, n_tdo_en);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
