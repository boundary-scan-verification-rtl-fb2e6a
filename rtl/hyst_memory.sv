// hyst_memory: the hysteretic memory of an IEEE 1149.6 test receiver.
//
// A flip-flop with asynchronous set and clear and a clocked initialisation
// path. set (from the upper comparator) forces 1, clr (from the lower
// comparator) forces 0; set wins if both are high. When neither is high the
// memory keeps its value, except that on a falling TCK edge with init high
// (the TAP in Exit1-DR or Exit2-DR) it loads init_data, the capture flop of
// its boundary cell. q feeds the capture input of that cell.
//
// The set/clear/init structure is the one of the receiver's memory element
// (set and clear from the two comparators, Init Data and Init Clk); set
// winning over clear is this design's choice, as the comparators never
// assert both. set and clr are kept as two separate asynchronous inputs
// (a flop with both preset and clear), because in DC mode they are exact
// complements and a merged load would never see an edge; some synthesis
// front ends accept only one asynchronous input per flop and map this
// cell by hand from the library's set/reset flop.
module hyst_memory (
  input  logic tck,
  input  logic set,
  input  logic clr,
  input  logic init,
  input  logic init_data,
  output logic q
);

  always_ff @(negedge tck or posedge set or posedge clr) begin
    if (set)       q <= 1'b1;
    else if (clr)  q <= 1'b0;
    else if (init) q <= init_data;
  end

endmodule
