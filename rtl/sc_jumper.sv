// sc_jumper: PCB jumper in the slow-control daisy chain, in front of the SC
// input of chip N.
//
// Normally chip N reads the SC output of chip N-1.  If chip N-1 fails, its
// own jumper is taken off (the input of the dead chip is left to its
// pull-down) and the jumper of chip N is moved to read chip N-2, so the
// chain skips the dead chip.
//
// Purely combinational; a board part, not on the chip.  From the original
// description: the three positions.  Own choice: a removed jumper gives 0.
module sc_jumper
  import roc_pkg::*;
(
  input  jumper_t pos,
  input  logic    prev1,   // SC output of chip N-1
  input  logic    prev2,   // SC output of chip N-2
  output logic    srin     // SC input of chip N
);

  always_comb begin
    unique case (pos)
      JMP_NORMAL: srin = prev1;
      JMP_BYPASS: srin = prev2;
      default:    srin = 1'b0;
    endcase
  end

endmodule
