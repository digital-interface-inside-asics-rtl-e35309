// lvds_receiver: behavioural model of a clock LVDS receiver whose bias
// current can be switched off (not synthesizable logic: an analog part).
//
// While start is low the receiver draws no bias and its output stays low.
// When start rises, the output follows the differential input only after
// START_NS nanoseconds, the receiver's start-up time; when start falls the
// output drops at once.  The start-up time of the real part is calibrated
// and not given; 500 ns is this model's choice.
module lvds_receiver #(
  parameter int unsigned START_NS = 500
) (
  input  logic in_p,
  input  logic in_n,
  input  logic start,
  output logic out
);
  logic ready;

  always begin
    ready = 1'b0;
    wait (start);
    #(START_NS * 1ns);
    if (start) ready = 1'b1;
    wait (!start);
  end

  assign out = ready & start & in_p & ~in_n;

endmodule
