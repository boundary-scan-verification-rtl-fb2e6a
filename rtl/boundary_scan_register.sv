// boundary_scan_register: the 16-cell boundary register of the device.
//
// Cells 0..N_RX-1 sit behind the receive pins (cell i captures rx_cap[i],
// the output of that pin's test receiver, while the pin itself, rx_pin[i],
// goes on to the system logic as core_rx[i]);
// cells N_RX..N_RX+N_TX-1 sit behind the transmit pins (cell N_RX+j captures
// core_tx[j] from the system logic and drives tx_out[j]). Cell numbering
// follows the usual convention: the highest cell takes TDI and cell 0 feeds
// TDO, so the first bit shifted in ends in the highest cell and cell 0
// leaves first.
//
// Input cells are standard cells with mode held at 0: the device defines no
// INTEST, so receive pins always reach the system logic. With mode at 0 the
// cell's parallel output would repeat its capture input, which behind an
// AC pin is the test receiver; the pin, not the receiver, feeds the core,
// so that output is left open and core_rx is the pin. Output cells are
// AC-capable cells whose mode follows mode_out (EXTEST, EXTEST_PULSE,
// EXTEST_TRAIN, CLAMP). cap_q gives each input cell's capture flop, which
// initialises the matching test receiver. The cell counts are the device's;
// the order of cells in the chain is this design's choice.
module boundary_scan_register
  import jtag_pkg::*;
#(
  parameter int unsigned N_RX = 8,
  parameter int unsigned N_TX = 8
) (
  input  logic            tck,
  input  logic            trst_n,
  input  tap_state_e      state,
  input  logic            sel,
  input  logic            tdi,
  input  logic            mode_out,
  input  logic            ac_mode,
  input  logic            ac_signal,
  input  logic [N_RX-1:0] rx_pin,
  input  logic [N_RX-1:0] rx_cap,
  output logic [N_RX-1:0] core_rx,
  output logic [N_RX-1:0] cap_q,
  input  logic [N_TX-1:0] core_tx,
  output logic [N_TX-1:0] tx_out,
  output logic            so
);

  localparam int unsigned LEN = N_RX + N_TX;

  logic capture, shift, update;
  logic [LEN-1:0] q;   // capture flop of every cell
  logic [LEN-1:0] si;  // serial input of every cell

  assign capture = sel && state == CAPTURE_DR;
  assign shift   = sel && state == SHIFT_DR;
  assign update  = sel && state == UPDATE_DR;

  assign si = {tdi, q[LEN-1:1]};
  assign so = q[0];
  assign cap_q = q[N_RX-1:0];

  for (genvar i = 0; i < N_RX; i++) begin : g_rx
    bsc_cell u_cell (
      .tck, .trst_n, .capture, .shift, .update,
      .mode (1'b0),
      .pi   (rx_cap[i]),
      .si   (si[i]),
      .so   (q[i]),
      .po   ()
    );
    assign core_rx[i] = rx_pin[i];
  end

  for (genvar j = 0; j < N_TX; j++) begin : g_tx
    ac_bsc_cell u_cell (
      .tck, .trst_n, .capture, .shift, .update,
      .mode      (mode_out),
      .ac_mode,
      .ac_signal,
      .pi        (core_tx[j]),
      .si        (si[N_RX+j]),
      .so        (q[N_RX+j]),
      .po        (tx_out[j])
    );
  end

endmodule
