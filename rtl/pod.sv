// pod: Power On Digital.  Starts and stops one clock LVDS receiver and
// gates the clock it delivers, so that the digital part only draws power
// during the few milliseconds in which it works.  One instance sits behind
// each of the two clock receivers (fast and slow clock).
//
// Two requests keep the clock running; ClkOut = Clkin AND (either request):
//
//  * Acquisition and conversion (common to all chips, driven by the DAQ):
//    PowerOnDigital high sets the two-stage enable asynchronously, which
//    starts the LVDS receiver at once.  When PowerOnDigital falls, the low
//    level walks through the two stages on falling edges of Clkin, so
//    the clock and the receiver stop together, synchronously, at most two
//    clock ticks later.  PowerOnDigital high therefore also forces the clock.
//
//  * Readout (daisy chained): a StartReadOut pulse starts the LVDS receiver
//    asynchronously.  Once the receiver runs, StartReadOut is synchronised
//    (two flip-flops on the falling edge of Clkin); after the synchronised
//    pulse has ended, the readout clock enable is set and, one cycle later,
//    a one-cycle StartReadOutInt pulse starts the chip's readout.  The
//    StartReadOut pulse must therefore outlast the receiver start-up time.
//    EndReadOut is sampled on the rising edge of ClkOut; when it has been
//    seen high and then low again, the enable, and with it the receiver,
//    is released on a falling edge.
//
// All enables change on the falling edge of Clkin, while Clkin is low, so
// the AND gate makes no clock glitch.  rstb AND enable resets the readout
// part; with enable low only PowerOnDigital can run the clock.  With
// use_ext_sro set, StartReadOutInt is the StartReadOut input itself, as in
// chips without this block.
//
// From the original description: the block diagram (receiver, two enable
// blocks, OR gates for StartLVDS and EnableClock, AND gate for ClkOut, Rstb
// AND Enable, StartReadOutInt on the falling Clkin edge, EndReadOut on the
// rising ClkOut edge), asynchronous set and synchronous release, release
// within two ticks, the ordering of the start-up waveforms.  Own choices:
// the state machine, waiting for the end of the EndReadOut pulse, the
// one-cycle StartReadOutInt.
module pod (
  input  logic clkin,             // clock from the LVDS receiver
  input  logic power_on_digital,  // PowerOnDAQ
  input  logic start_readout,     // StartReadOut (after the bypass switches)
  input  logic end_readout,       // EndReadOut of this chip
  input  logic rstb,
  input  logic enable,            // SC: POD readout control on
  input  logic use_ext_sro,       // SC: pass StartReadOut through
  output logic start_lvds,        // bias on for the LVDS receiver
  output logic enable_clock,
  output logic clkout,
  output logic start_readout_int
);

  // ---------------- acquisition / conversion enable -------------------
  logic acq1, acq2;

  always_ff @(negedge clkin or posedge power_on_digital) begin
    if (power_on_digital) {acq1, acq2} <= 2'b11;
    else                  {acq1, acq2} <= {1'b0, acq1};
  end

  // ---------------- readout enable ------------------------------------
  typedef enum logic [2:0] {
    RO_IDLE,     // waiting for StartReadOut
    RO_ARMED,    // StartReadOut seen, waiting for its end
    RO_START,    // clock enabled, StartReadOutInt next
    RO_RUN,      // readout running
    RO_ENDING    // EndReadOut seen, waiting for its end
  } ro_state_t;

  ro_state_t state;
  logic      ro_rstb;
  logic      sro1, sro2;
  logic      eor_cap;
  logic      en_ro;
  logic      sro_pulse;

  assign ro_rstb = rstb & enable;

  always_ff @(negedge clkin or negedge ro_rstb) begin
    if (!ro_rstb) {sro1, sro2} <= 2'b00;
    else          {sro1, sro2} <= {start_readout, sro1};
  end

  always_ff @(negedge clkin or negedge ro_rstb) begin
    if (!ro_rstb) begin
      state     <= RO_IDLE;
      en_ro     <= 1'b0;
      sro_pulse <= 1'b0;
    end else begin
      sro_pulse <= 1'b0;
      unique case (state)
        RO_IDLE:   if (sro2) state <= RO_ARMED;
        RO_ARMED:  if (!sro2) begin
                     state <= RO_START;
                     en_ro <= 1'b1;
                   end
        RO_START:  begin
                     state     <= RO_RUN;
                     sro_pulse <= 1'b1;
                   end
        RO_RUN:    if (eor_cap) state <= RO_ENDING;
        RO_ENDING: if (!eor_cap) begin
                     state <= RO_IDLE;
                     en_ro <= 1'b0;
                   end
        default:   state <= RO_IDLE;
      endcase
    end
  end

  always_ff @(posedge clkout or negedge ro_rstb) begin
    if (!ro_rstb) eor_cap <= 1'b0;
    else          eor_cap <= end_readout;
  end

  // ---------------- outputs --------------------------------------------
  logic lvds_ro;

  assign lvds_ro = ro_rstb & (start_readout | sro1 | sro2 | (state != RO_IDLE));

  assign start_lvds        = acq2 | lvds_ro;
  assign enable_clock      = acq2 | en_ro;
  assign clkout            = clkin & enable_clock;
  assign start_readout_int = use_ext_sro ? start_readout : sro_pulse;

endmodule
