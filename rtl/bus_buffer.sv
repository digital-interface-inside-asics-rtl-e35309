// bus_buffer: pair of output buffers driving one chip output (Data or
// TransmitOn) onto the shared bus of the daisy chain.
//
// Both buffers take the same signal; each has a switch, closed by its own
// SC bit, between the buffer and the bus.  If a buffer fails and sticks the
// bus line, it can be disconnected and the other one used.  The bus is
// modelled as a wired-OR (open-drain style) line: an output bit is the
// level this chip pulls onto that line, 0 when it does not drive.
//   SPLIT = 0 : both buffers on the same bus line (line[0]; line[1] is 0).
//   SPLIT = 1 : buffer i on its own bus line i.
//
// Purely combinational.  From the original description: two buffers, each
// removable by SC, the two wiring options.  Own choices: wired-OR bus
// model, driving only while the chip transmits (drive).
module bus_buffer #(
  parameter bit SPLIT = 1'b0
) (
  input  logic       d,       // signal to put on the bus
  input  logic       drive,   // this chip owns the bus
  input  logic [1:0] buf_en,  // SC: buffer i connected to the bus
  output logic [1:0] line     // contribution to bus line(s)
);

  logic [1:0] pull;

  assign pull = {2{d & drive}} & buf_en;

  always_comb begin
    if (SPLIT) line = pull;
    else       line = {1'b0, |pull};
  end

endmodule
