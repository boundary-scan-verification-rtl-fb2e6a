// ac_bsc_cell: boundary scan cell behind an AC-capable output driver
// (IEEE 1149.6).
//
// It is the standard cell (capture flop, update flop, mode mux) with one more
// path: the update flop output XORed with the AC test signal. When ac_mode is
// high (EXTEST_PULSE or EXTEST_TRAIN) and mode is high, the pin is driven
// with that modulated value, so each transition of the AC test signal inverts
// the driven data; with ac_mode low the pin behaves as under EXTEST. With
// mode low the mission data passes straight through.
//
// The mux/XOR structure is the document's. Timing: capture and shift on the
// rising TCK edge, update on the falling edge; the AC test signal itself
// changes on falling TCK edges (see ac_signal_gen).
module ac_bsc_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic capture,
  input  logic shift,
  input  logic update,
  input  logic mode,
  input  logic ac_mode,
  input  logic ac_signal,
  input  logic pi,       // from mission logic
  input  logic si,
  output logic so,
  output logic po        // to the output driver
);

  logic upd_q;
  logic test_data;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)      so <= 1'b0;
    else if (shift)   so <= si;
    else if (capture) so <= pi;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)     upd_q <= 1'b0;
    else if (update) upd_q <= so;
  end

  assign test_data = ac_mode ? (upd_q ^ ac_signal) : upd_q;
  assign po        = mode ? test_data : pi;

endmodule
