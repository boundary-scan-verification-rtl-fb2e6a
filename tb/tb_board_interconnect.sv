// tb_board_interconnect: two chips on one board, tested through one chain.
//
// Two xyz_ip instances are daisy-chained (tester TDI -> chip A -> chip B ->
// tester TDO) and their lanes are cross-wired: A's transmit pin j drives B's
// receive pin j and B's transmit pin j drives A's receive pin j. Chip B has
// its own IDCODE. The bench reads both IDCODEs, reads one chip's IDCODE with
// the other in BYPASS, then runs a wire test under EXTEST: each chip drives a
// counting pattern (and its complement) and the other captures it, first on
// good wires, then with one wire stuck at 0 and one wire bridged to its
// neighbour, each of which must show up as exactly the expected bad bits.
// Finally EXTEST_PULSE with receivers initialised to the complement tells a
// connected wire from an open one.
//
// DR chain layout (LSB first): bits 0-15 are chip B's cells, bits 16-31
// chip A's; within a chip cells 0-7 are receive pins and 8-15 transmit pins.
// IR chain: bits 0-7 chip B, 8-15 chip A.
module tb_board_interconnect;
  import jtag_pkg::*;

  localparam real HALF = 12.5;
  localparam logic [31:0] ID_A = 32'h8410_8013;
  localparam logic [31:0] ID_B = 32'h0123_4567;

  logic tck = 1'b0, tms = 1'b1, tdi = 1'b1, trst_n = 1'b1;
  logic tdo_a, tdo_b, en_a, en_b;
  logic [7:0] a_rx, a_tx, a_oe, a_core_rx, b_rx, b_tx, b_oe, b_core_rx;
  logic [7:0] a_core_tx = 8'h00, b_core_tx = 8'hFF;
  // wire faults on the A->B direction
  logic [7:0] stuck0 = 8'h00;   // wires stuck at 0
  logic [7:0] open_w = 8'h00;   // open wires: receiver input floats high
  logic       bridge = 1'b0;    // wire 2 bridged (wired-AND) with wire 3
  logic [7:0] ab;
  int checks = 0, failures = 0;
  int n_id_chain, n_bypass_chain, n_wire_patterns, n_stuck_found, n_bridge_found, n_open_found, n_ac_ok;

  always #(HALF) tck = ~tck;

  always_comb begin
    ab = a_tx & ~stuck0;
    if (bridge) begin
      ab[2] = a_tx[2] & a_tx[3];
      ab[3] = a_tx[2] & a_tx[3];
    end
    for (int i = 0; i < 8; i++) if (open_w[i]) ab[i] = 1'b1;  // floats high
  end
  assign b_rx = ab;
  assign a_rx = b_tx;

  xyz_ip chip_a (.tck, .tms, .tdi, .trst_n, .tdo(tdo_a), .tdo_en(en_a), .rx_pad(a_rx),
                 .core_rx(a_core_rx), .core_tx(a_core_tx), .tx_pad(a_tx), .tx_oe(a_oe));
  xyz_ip #(.IDCODE(ID_B)) chip_b (.tck, .tms, .tdi(tdo_a), .trst_n, .tdo(tdo_b), .tdo_en(en_b),
                 .rx_pad(b_rx), .core_rx(b_core_rx), .core_tx(b_core_tx), .tx_pad(b_tx),
                 .tx_oe(b_oe));

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

  task automatic clk(logic m, logic d, output logic o);
    tms = m; tdi = d;
    @(posedge tck); o = tdo_b;
    @(negedge tck); #1;
  endtask

  task automatic tmsseq(string bits);
    logic o;
    foreach (bits[i]) clk(bits[i] == "1", 1'b1, o);
  endtask

  // Scan from Run-Test/Idle, back to Run-Test/Idle.
  task automatic scan(bit ir, int len, logic [63:0] din, output logic [63:0] dout);
    logic o;
    dout = '0;
    tmsseq(ir ? "1100" : "100");
    for (int i = 0; i < len; i++) begin
      clk(i == len - 1, din[i], o);
      dout[i] = o;
    end
    tmsseq("10");
  endtask

  task automatic sir2(logic [7:0] op_a, logic [7:0] op_b);
    logic [63:0] o;
    scan(1'b1, 16, {48'b0, op_a, op_b}, o);
    check(o[15:0] == 16'h0101, $sformatf("IR capture %h", o[15:0]));
  endtask

  task automatic runtest(int n);
    logic o;
    repeat (n) clk(1'b0, 1'b1, o);
  endtask

  // DR image for both chips: A's cells then B's.
  function automatic logic [63:0] image(logic [7:0] a_txv, logic [7:0] a_rxv,
                                        logic [7:0] b_txv, logic [7:0] b_rxv);
    return {32'b0, a_txv, a_rxv, b_txv, b_rxv};
  endfunction

  initial begin
    logic [63:0] o;
    logic [7:0] pa, pb, got_b, got_a, bad;

    #1 trst_n = 1'b0;
    #30 trst_n = 1'b1;
    @(negedge tck); #1;
    tmsseq("0");   // Run-Test/Idle

    // both IDCODEs, B first (nearest TDO)
    scan(1'b0, 64, 64'b0, o);
    check(o[31:0] == ID_B && o[63:32] == ID_A, $sformatf("IDCODE chain %h", o));
    n_id_chain++;

    // A in BYPASS, B in IDCODE: 33-bit chain
    sir2(8'hFF, 8'h0C);
    scan(1'b0, 34, 64'h2_0000_0000, o);
    check(o[31:0] == ID_B && o[32] == 1'b0, "IDCODE of B then A's bypass bit");
    check(o[33] == 1'b0, "first TDI bit through both registers");
    n_bypass_chain++;

    // wire test: counting patterns and complements, then faults
    sir2(8'h01, 8'h01);
    scan(1'b0, 32, image(8'h01, 8'h00, 8'h01, 8'h00), o);       // PRELOAD
    sir2(8'h09, 8'h09);                                        // EXTEST
    for (int f = 0; f < 3; f++) begin
      stuck0 = (f == 1) ? 8'h20 : 8'h00;
      bridge = (f == 2);
      bad = 8'h00;
      for (int k = 0; k < 6; k++) begin
        logic [7:0] code;
        case (k)
          0: code = 8'b1010_1010; 1: code = 8'b1100_1100; 2: code = 8'b1111_0000;
          3: code = 8'b0101_0101; 4: code = 8'b0011_0011; default: code = 8'b0000_1111;
        endcase
        pa = code; pb = ~code;
        // drive this pattern (Update-DR), then capture it on the next scan
        scan(1'b0, 32, image(pa, 8'h00, pb, 8'h00), o);
        scan(1'b0, 32, image(pa, 8'h00, pb, 8'h00), o);
        got_b = o[7:0];      // B's receive cells: what A drove
        got_a = o[23:16];    // A's receive cells: what B drove
        check(got_a == pb, $sformatf("B->A wires: %h expected %h", got_a, pb));
        bad |= got_b ^ pa;
        if (f == 0) begin
          check(got_b == pa, $sformatf("A->B wires: %h expected %h", got_b, pa));
          n_wire_patterns++;
        end
      end
      if (f == 1) begin
        check(bad == 8'h20, $sformatf("stuck-at-0 wire 5 found as %h", bad));
        if (bad == 8'h20) n_stuck_found++;
      end
      if (f == 2) begin
        check(bad == 8'h0C, $sformatf("bridge 2-3 found as %h", bad));
        if (bad == 8'h0C) n_bridge_found++;
      end
    end
    stuck0 = 8'h00; bridge = 1'b0;

    // AC wire test: EXTEST_PULSE, A drives 3C, B's receivers start at C3
    sir2(8'h0E, 8'h0E);
    for (int f = 0; f < 2; f++) begin
      open_w = (f == 1) ? 8'h10 : 8'h00;                       // wire 4 open
      scan(1'b0, 32, image(8'h3C, 8'h00, 8'h00, 8'hC3), o);   // drive 3C, init C3
      runtest(3);                                              // pulse
      scan(1'b0, 32, image(8'h3C, 8'h00, 8'h00, 8'hC3), o);
      if (f == 0) begin
        check(o[7:0] == 8'h3C, $sformatf("AC wires: %h", o[7:0]));
        if (o[7:0] == 8'h3C) n_ac_ok++;
      end else begin
        // the open wire keeps the initial value (bit 4 of C3 = 0) although it
        // floats high; a level detector would have read 1 there
        check(o[7:0] == 8'h2C, $sformatf("open wire 4 found: %h", o[7:0]));
        if (o[7:0] == 8'h2C) n_open_found++;
      end
    end
    open_w = 8'h00;

    check(n_id_chain > 0, "IDCODE chain read");
    check(n_bypass_chain > 0, "bypass in chain");
    check(n_wire_patterns > 0, "wire patterns");
    check(n_stuck_found > 0, "stuck wire found");
    check(n_bridge_found > 0, "bridge found");
    check(n_ac_ok > 0, "AC wire test");
    check(n_open_found > 0, "open wire found");
    $display("mechanisms: id_chain=%0d bypass_chain=%0d patterns=%0d stuck=%0d bridge=%0d ac=%0d open=%0d",
             n_id_chain, n_bypass_chain, n_wire_patterns, n_stuck_found, n_bridge_found, n_ac_ok,
             n_open_found);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
