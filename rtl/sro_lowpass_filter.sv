// sro_lowpass_filter: behavioural model of the low-pass filter in front of
// the asynchronous StartReadOut input of the Power On Digital blocks (not
// synthesizable logic: on silicon this is an analog RC filter).
//
// StartReadOut starts the clock receivers with no clock running, so a
// glitch on it would wake the chip.  The filter is modelled by its effect,
// as an inertial delay of TAU_NS: the output follows the input TAU_NS
// later, and an input pulse shorter than TAU_NS is swallowed, as the slow
// RC node never crosses the threshold.  Both edges are delayed alike, so a
// long pulse keeps its width.  Synthesis ignores the delay and sees a
// wire; on silicon the filter is an analog cell.
//
// Interface: in (StartReadOut after the bypass switches), out (to both
// PODs); out follows in after TAU_NS.  That a filter sits on this input
// follows the original description; its time constant is not given, and
// 50 ns is this model's choice: short next to the 1.6 us EndReadOut that
// drives the next chip's StartReadOut, long next to a crosstalk spike.
module sro_lowpass_filter #(
  parameter int unsigned TAU_NS = 50
) (
  input  logic in,
  output logic out
);
  // a delayed continuous assignment is inertial: shorter pulses are lost
  assign #(TAU_NS * 1ns) out = in;

endmodule
