// ro_bypass: StartReadOut / EndReadOut switches of one chip.
//
// The readout token travels from chip to chip: the EndReadOut (ERO) of
// chip N-1 is the StartReadOut (SRO) of chip N.  Each chip also has a
// bypass input SRO-B, wired to the ERO-B output of chip N-2, and a bypass
// output ERO-B, wired to SRO-B of chip N+2.  Three SC bits set the
// switches:
//   self_byp : the chip bypasses itself; SRO is passed straight to ERO and
//              the chip's own readout is not started.
//   in_byp   : the chip takes its start from SRO-B instead of SRO (set on
//              chip N+1 when chip N is dead).
//   out_byp  : the chip sends its end of readout on ERO-B instead of ERO
//              (set on chip N-1 when chip N is dead).
// A switch that is open leaves its output low.
//
// Purely combinational.  From the original description: the four lines, the
// self bypass and the neighbour bypass.  Own choices: the open-switch
// level and self bypass taking precedence over the other two bits.
module ro_bypass (
  input  logic sro,        // StartReadOut from chip N-1 (ERO)
  input  logic sro_b,      // StartReadOutBypass from chip N-2 (ERO-B)
  input  logic ero_int,    // end of this chip's readout
  input  logic self_byp,
  input  logic in_byp,
  input  logic out_byp,
  output logic sro_int,    // start of this chip's readout
  output logic ero,        // to SRO of chip N+1
  output logic ero_b       // to SRO-B of chip N+2
);

  always_comb begin
    if (self_byp) begin
      sro_int = 1'b0;
      ero     = sro;
      ero_b   = 1'b0;
    end else begin
      sro_int = in_byp ? sro_b : sro;
      ero     = out_byp ? 1'b0 : ero_int;
      ero_b   = out_byp ? ero_int : 1'b0;
    end
  end

endmodule
