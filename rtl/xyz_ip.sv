// xyz_ip: boundary scan test logic of an IP with four differential receive
// and four differential transmit lanes (IEEE 1149.1 with 1149.6 AC EXTEST).
//
// The TAP controller walks its 16 states on TMS. An 8-bit instruction
// register selects one of three data registers between TDI and TDO: the
// 1-bit bypass register, the 32-bit IDCODE register, or the 16-cell boundary
// register (8 receive-pin cells, then 8 transmit-pin cells). Each receive pin
// has a test receiver (level detector, or edge detector under AC EXTEST) in
// front of its cell; each transmit pin has an AC-capable cell whose data is
// inverted by the AC test signal under EXTEST_PULSE and EXTEST_TRAIN.
//
// Instructions (8-bit opcodes): SAMPLE/PRELOAD 01, CLAMP 04, HIGHZ 08,
// EXTEST 09, IDCODE 0C (the reset instruction), EXTEST_PULSE 0E,
// EXTEST_TRAIN 0F, BYPASS FF; any other opcode acts as BYPASS.
//
// Timing: TMS and TDI are sampled and registers capture/shift on the rising
// TCK edge; instruction and data updates, the AC test signal and TDO change
// on the falling edge. tdo_en is high from the falling edge that starts a
// shift until the falling edge after it; a pad would tri-state TDO
// otherwise. tx_oe is low under HIGHZ (pins without a control cell, so the
// whole group is disabled). trst_n is an asynchronous active-low reset.
// Pin indices: rx_pad[2k] is RXk_N, rx_pad[2k+1] RXk_P; tx_pad[2k] is TXk_P,
// tx_pad[2k+1] TXk_N.
//
// Register lengths, opcodes, register access and the IDCODE value are the
// device's own; pin order in the chain and the decode of undefined opcodes
// are this design's choices.
module xyz_ip
  import jtag_pkg::*;
#(
  parameter int unsigned N_RX   = 8,
  parameter int unsigned N_TX   = 8,
  parameter logic [31:0] IDCODE = DEFAULT_IDCODE
) (
  input  logic            tck,
  input  logic            tms,
  input  logic            tdi,
  input  logic            trst_n,
  output logic            tdo,
  output logic            tdo_en,
  input  logic [N_RX-1:0] rx_pad,
  output logic [N_RX-1:0] core_rx,
  input  logic [N_TX-1:0] core_tx,
  output logic [N_TX-1:0] tx_pad,
  output logic [N_TX-1:0] tx_oe
);

  tap_state_e state;
  opcode_t    instr;
  dr_sel_e    dr_sel;
  logic       mode_out, ac_mode, ac_train, highz, ac_signal;
  logic       ir_so, byp_so, id_so, bsr_so, dr_so, tdo_d;
  logic [N_RX-1:0] rx_cap, cap_q;
  logic       rx_init;

  tap_controller u_tap (.tck, .trst_n, .tms, .state);

  instruction_register u_ir (
    .tck, .trst_n, .state, .tdi, .so(ir_so), .instr
  );

  instruction_decoder u_dec (
    .instr, .dr_sel, .mode_out, .ac_mode, .ac_train, .highz
  );

  bypass_register u_byp (
    .tck, .trst_n, .state, .sel(dr_sel == DR_BYPASS), .tdi, .so(byp_so)
  );

  idcode_register #(.IDCODE(IDCODE)) u_id (
    .tck, .trst_n, .state, .sel(dr_sel == DR_IDCODE), .tdi, .so(id_so)
  );

  ac_signal_gen u_acgen (
    .tck, .trst_n, .state, .ac_mode, .ac_train, .ac_signal
  );

  assign rx_init = state == EXIT1_DR || state == EXIT2_DR;

  for (genvar i = 0; i < N_RX; i++) begin : g_rx
    test_receiver u_rcv (
      .tck, .pad(rx_pad[i]), .ac_mode, .init(rx_init),
      .init_data(cap_q[i]), .out(rx_cap[i])
    );
  end

  boundary_scan_register #(.N_RX(N_RX), .N_TX(N_TX)) u_bsr (
    .tck, .trst_n, .state, .sel(dr_sel == DR_BOUNDARY), .tdi,
    .mode_out, .ac_mode, .ac_signal,
    .rx_pin(rx_pad), .rx_cap, .core_rx, .cap_q, .core_tx, .tx_out(tx_pad), .so(bsr_so)
  );

  assign tx_oe = {N_TX{~highz}};

  always_comb begin
    unique case (dr_sel)
      DR_IDCODE:   dr_so = id_so;
      DR_BOUNDARY: dr_so = bsr_so;
      default:     dr_so = byp_so;
    endcase
    tdo_d = (state == SHIFT_IR) ? ir_so : dr_so;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= tdo_d;
      tdo_en <= state == SHIFT_IR || state == SHIFT_DR;
    end
  end

endmodule
