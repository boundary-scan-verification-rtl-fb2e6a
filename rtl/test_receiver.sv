// test_receiver: an IEEE 1149.6 test receiver for one receive pin.
//
// It is the analog front end (rx_comparator, a behavioural model) followed
// by the hysteretic memory (hyst_memory). With ac_mode low (EXTEST and
// mission mode) it is a level detector: out follows pad. With ac_mode high
// (EXTEST_PULSE, EXTEST_TRAIN) it is an edge detector: a rising pad edge sets
// the memory, a falling edge clears it, and out rebuilds the driven waveform
// even when an AC-coupled line has settled back to its bias level. On a
// falling TCK edge with init high (Exit1-DR or Exit2-DR) the memory is loaded
// with init_data, the capture flop of its boundary cell, so a line that shows
// no transition (an open line) reports that initial value.
//
// The structure (comparators setting and clearing a memory that is
// initialised in Exit1-DR/Exit2-DR from the cell) follows the 1149.6
// receiver; the digital reduction of the analog part is this design's.
module test_receiver (
  input  logic tck,
  input  logic pad,
  input  logic ac_mode,
  input  logic init,
  input  logic init_data,
  output logic out
);

  logic set, clr;

  rx_comparator u_cmp (.pad, .ac_mode, .set, .clr);

  hyst_memory u_mem (.tck, .set, .clr, .init, .init_data, .q(out));

endmodule
