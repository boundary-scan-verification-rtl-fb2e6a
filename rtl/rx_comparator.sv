// rx_comparator: behavioural model of the analog front end of an IEEE
// 1149.6 test receiver (RC low-pass filter, DC/AC reference switch and two
// comparators with hysteresis offsets).
//
// This is a behavioural model, not synthesizable logic; it works on the
// digital pad level and stands in for the analog circuit. In DC mode
// (ac_mode low) the comparators see a fixed bias, so set is high while the
// pad is high and clr while it is low: the memory behind them follows the
// level. In AC mode the pad is compared with a delayed copy of itself (the
// filtered signal), so a rising edge gives a set pulse and a falling edge a
// clr pulse of FILTER_DELAY length, and a steady level, however long, gives
// neither. Comparator thresholds and the slow decay of an AC-coupled line are
// not modelled: every pad change counts as a valid transition. Synthesis
// tools ignore the delay, so the AC pulses vanish there; use the pad
// library's receiver in a real chip.
module rx_comparator #(
  parameter int unsigned FILTER_DELAY = 1   // time units, stands for the RC filter
) (
  input  logic pad,
  input  logic ac_mode,
  output logic set,
  output logic clr
);

  logic pad_filt;

  assign #(FILTER_DELAY) pad_filt = pad;

  assign set = ac_mode ? (pad & ~pad_filt) : pad;
  assign clr = ac_mode ? (~pad & pad_filt) : ~pad;

endmodule
