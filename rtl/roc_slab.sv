// roc_slab: a detector slab of NCHIP ROC chips on one board, daisy chained.
//
// The DAQ drives the common signals of all chips (clocks, reset,
// PowerOnDigital, PowerOnAnalog, RazChn/NoTrig, ValEvt, StartAcquisition,
// StartConversion_b, slow-control clock, reset and select) and collects ChipSat, the shared Data and TransmitOn
// bus lines, the end of the readout and the end of the slow-control chain.
//
// Readout token: the DAQ's StartReadOut goes to chip 0; the EndReadOut of
// chip k is the StartReadOut of chip k+1, and the last EndReadOut returns to
// the DAQ.  The bypass line ERO-B of chip k goes to SRO-B of chip k+2, so a
// dead chip can be skipped by setting its two neighbours.  The DAQ's start
// also reaches SRO-B of chip 1, and the bypass outputs of the last two chips
// also return to the DAQ, so the first and the last chip can be skipped too.
//
// Slow-control chain: a PCB jumper in front of each chip (and one in front
// of the DAQ's return) selects the previous chip's output, the one before
// (skipping a dead chip) or nothing.
//
// Data and TransmitOn: the chips' buffers drive wired-OR bus lines; only
// the chip holding the readout token drives.  ChipSat is the OR of all
// chips' ChipSat.  All timing is that of the chips; the board adds none.
module roc_slab
  import roc_pkg::*;
#(
  parameter int unsigned NCHIP         = 4,
  parameter int unsigned FRAMES        = MEM_FRAMES,
  parameter int unsigned ADC_W         = ADC_BITS,
  parameter int unsigned ERO_CYCLES    = 8,
  parameter int unsigned LVDS_START_NS = 500,
  parameter bit          BUF_SPLIT     = 1'b0
) (
  input  logic               clk_fast_p,
  input  logic               clk_fast_n,
  input  logic               clk_slow_p,
  input  logic               clk_slow_n,
  input  logic               rstb,
  input  logic               power_on_digital,
  input  logic               start_acq,
  input  logic               start_conv_b,
  output logic               chip_sat,
  input  logic               power_on_analog,
  input  logic               raz_chn_p,
  input  logic               raz_chn_n,
  input  logic               val_evt_p,
  input  logic               val_evt_n,
  output logic [NCHIP-1:0]   raz_chn,
  output logic [NCHIP-1:0]   val_evt,
  input  logic [NCHIP-1:0]   trigger,
  input  logic [HIT_W-1:0]   hit [NCHIP],
  input  logic               start_readout,
  output logic               end_readout,
  output logic [1:0]         data,
  output logic [1:0]         transmit_on,
  input  logic               sc_sel,
  input  logic               sc_din,
  input  logic               sc_clk,
  input  logic               sc_rstb,
  output logic               sc_dout,
  input  jumper_t            jumper [NCHIP+1],
  output logic [PROBE_W-1:0] probe_sel [NCHIP],
  output sc_cfg_t            cfg [NCHIP],
  output logic [1:0]         clk_on [NCHIP],
  output logic [1:0]         lvds_on [NCHIP]
);

  logic [NCHIP-1:0] sat, ero, ero_b, sro, sro_b, sc_in, sc_out;
  logic [1:0]       data_line [NCHIP];
  logic [1:0]       txon_line [NCHIP];
  logic [NCHIP+1:0] sc_node;

  // sc_node[0] = DAQ output (also "chip -2"), sc_node[1] = DAQ output,
  // sc_node[k+2] = SC output of chip k.
  assign sc_node[0] = sc_din;
  assign sc_node[1] = sc_din;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    assign sc_node[k+2] = sc_out[k];

    sc_jumper u_jumper (
      .pos(jumper[k]), .prev1(sc_node[k+1]), .prev2(sc_node[k]), .srin(sc_in[k])
    );

    assign sro[k]   = (k == 0) ? start_readout : ero[(k == 0) ? 0 : k-1];
    assign sro_b[k] = (k == 0) ? 1'b0 :
                      (k == 1) ? start_readout : ero_b[(k < 2) ? 0 : k-2];

    roc_chip #(
      .FRAMES(FRAMES), .ADC_W(ADC_W), .ERO_CYCLES(ERO_CYCLES),
      .LVDS_START_NS(LVDS_START_NS), .BUF_SPLIT(BUF_SPLIT)
    ) u_chip (
      .clk_fast_p(clk_fast_p), .clk_fast_n(clk_fast_n),
      .clk_slow_p(clk_slow_p), .clk_slow_n(clk_slow_n),
      .rstb(rstb), .power_on_digital(power_on_digital),
      .start_acq(start_acq), .start_conv_b(start_conv_b), .chip_sat(sat[k]),
      .power_on_analog(power_on_analog),
      .raz_chn_p(raz_chn_p), .raz_chn_n(raz_chn_n), .val_evt_p(val_evt_p), .val_evt_n(val_evt_n),
      .raz_chn(raz_chn[k]), .val_evt(val_evt[k]),
      .trigger(trigger[k]), .hit(hit[k]),
      .sro(sro[k]), .sro_b(sro_b[k]), .ero(ero[k]), .ero_b(ero_b[k]),
      .data_line(data_line[k]), .txon_line(txon_line[k]),
      .sc_sel(sc_sel), .sc_din(sc_in[k]), .sc_clk(sc_clk), .sc_rstb(sc_rstb),
      .sc_dout(sc_out[k]),
      .probe_sel(probe_sel[k]), .cfg(cfg[k]), .clk_on(clk_on[k]), .lvds_on(lvds_on[k])
    );
  end

  // jumper in front of the DAQ's slow-control return
  sc_jumper u_jumper_out (
    .pos(jumper[NCHIP]), .prev1(sc_node[NCHIP+1]), .prev2(sc_node[NCHIP]), .srin(sc_dout)
  );

  always_comb begin
    data        = '0;
    transmit_on = '0;
    for (int k = 0; k < NCHIP; k++) begin
      data        |= data_line[k];
      transmit_on |= txon_line[k];
    end
  end

  assign chip_sat    = |sat;
  assign end_readout = ero[NCHIP-1] | ero_b[NCHIP-1] |
                       ((NCHIP > 1) ? ero_b[(NCHIP > 1) ? NCHIP-2 : 0] : 1'b0);

endmodule
