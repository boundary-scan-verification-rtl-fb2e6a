// bsc_cell: the standard boundary scan cell (BC_1 style).
//
// A capture/shift flip-flop and an update flip-flop sit between a parallel
// path and a serial path. On the rising TCK edge with capture high the
// capture flop loads pi (the pin or the system logic); with shift high it
// loads si from the previous cell. so is the capture flop, towards the next
// cell. On the falling TCK edge with update high the update flop takes the
// capture flop. po is pi when mode is 0 (the cell is transparent) and the
// update flop when mode is 1.
//
// The structure is the document's; expressing the gated Clock-DR and
// Update-DR as enables on TCK, and clearing both flops on TRST_N, are this
// design's choices.
module bsc_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic capture,  // Capture-DR with the boundary register selected
  input  logic shift,    // Shift-DR with the boundary register selected
  input  logic update,   // Update-DR with the boundary register selected
  input  logic mode,
  input  logic pi,
  input  logic si,
  output logic so,
  output logic po
);

  logic upd_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)      so <= 1'b0;
    else if (shift)   so <= si;
    else if (capture) so <= pi;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)     upd_q <= 1'b0;
    else if (update) upd_q <= so;
  end

  assign po = mode ? upd_q : pi;

endmodule
