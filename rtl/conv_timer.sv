// conv_timer: times the conversion phase on the fast (40 MHz) clock.
//
// The DAQ starts the conversion with a low pulse on StartConversion_b.  The
// pulse is synchronised (two flip-flops) and its falling edge starts a
// counter that runs for 2**ADC_BITS fast clock cycles, the length of one
// 12-bit ramp conversion (4096 x 25 ns = 102.4 us, the "max 103 us" of a
// 12-bit conversion at 40 MHz).  busy is high while the counter runs.  The
// analog ramp ADC itself is not modelled; this block only produces the
// digital timing of the phase.
//
// Timing: busy rises 3 clocks after start_conv_b falls and stays high for
// 2**ADC_BITS clocks.  A new start while busy is ignored.
module conv_timer #(
  parameter int unsigned ADC_BITS = 12
) (
  input  logic clk,
  input  logic rstb,
  input  logic start_conv_b,
  output logic busy
);

  logic s1, s2, s3;
  logic [ADC_BITS-1:0] cnt;

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) {s1, s2, s3} <= 3'b111;
    else       {s1, s2, s3} <= {start_conv_b, s1, s2};
  end

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      if (s3 && !s2) begin   // falling edge of the synchronised start
        busy <= 1'b1;
        cnt  <= '0;
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == {ADC_BITS{1'b1}}) busy <= 1'b0;
    end
  end

endmodule
