// sc_shift_reg: slow-control (or probe) shift register of a ROC chip.
//
// W flip-flops clocked on the rising edge of clk shift din towards the far
// end: q[0] takes din, q[i] takes q[i-1].  Each flip-flop has either its set
// or its reset input tied to the register reset, so an active reset loads
// the power-up configuration DEFAULT (bit i = flip-flop i counted from the
// input) instead of all zeros.  The last bit feeds the chip (last_bit) and
// an extra flip-flop clocked on the falling edge, whose output dout goes to
// the next ASIC of the daisy chain.  The next chip captures on its rising
// edge, so the chip-to-chip hop has half a clock period of margin while the
// chain still moves one bit per clock.
//
// W must be at least 2.
//
// Timing: one bit per rising edge; dout follows last_bit half a period later.
// From the original description: the set/reset default (example "011" =
// first flip-flop reset, the other two set), the opposite-edge output
// flip-flop with its own reset.  Own choices: active-low asynchronous reset,
// the output flip-flop resets to 0.
module sc_shift_reg #(
  parameter int unsigned   W       = 3,
  parameter logic [W-1:0]  DEFAULT = 3'b110   // "011" read from the input side
) (
  input  logic         clk,
  input  logic         rstb,
  input  logic         din,
  output logic [W-1:0] q,
  output logic         last_bit,
  output logic         dout
);

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) q <= DEFAULT;
    else q <= {q[W-2:0], din};
  end

  assign last_bit = q[W-1];

  always_ff @(negedge clk or negedge rstb) begin
    if (!rstb) dout <= 1'b0;
    else dout <= last_bit;
  end

endmodule
