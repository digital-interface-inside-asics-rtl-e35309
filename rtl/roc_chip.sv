// roc_chip: digital interface of one ROC front-end chip.
//
// The chip works in three phases: acquisition and conversion, common to all
// chips of a detector slab and driven by the DAQ, and a readout that passes
// from chip to chip.  Its clocks arrive on two LVDS receivers (fast 40 MHz
// and slow 5 MHz clock); each receiver has its own Power On Digital block
// (pod) that switches the receiver bias on and gates the clock only while
// the chip works: from PowerOnDigital (acquisition and conversion, and also
// during the reset before them) and from StartReadOut until the end of the
// chip's own EndReadOut pulse.  The slow POD makes the internal start of
// readout.  StartReadOut reaches both PODs through a low-pass filter
// (behavioural model, SRO_FILTER_NS = 50 ns is this design's choice), so it
// is delayed by 50 ns and pulses shorter than 50 ns are ignored.
//
// Blocks: slow-control and probe shift registers behind one set of pads
// (sc_pad_mux, two sc_shift_reg), the readout token switches (ro_bypass),
// the memory and phase controller on the slow clock (acq_readout_ctrl),
// the conversion timer on the fast clock (conv_timer), and two removable
// buffers on each of the Data and TransmitOn outputs (bus_buffer).
//
// Interface: all inputs are asynchronous to the chip's gated clocks except
// trigger and hit, which the analog front end presents in step with the
// slow clock.  Data and TransmitOn are shown as wired-OR bus contributions.
// clk_on / lvds_on show the two POD enables (index 0 fast, 1 slow).  The
// RazChn/NoTrig and ValEvt receivers, switched by PowerOnAnalog, hand their
// signals to the analog front end, which is outside this description.
module roc_chip
  import roc_pkg::*;
#(
  parameter int unsigned FRAMES        = MEM_FRAMES,
  parameter int unsigned ADC_W         = ADC_BITS,
  parameter int unsigned ERO_CYCLES    = 8,
  parameter int unsigned LVDS_START_NS = 500,
  parameter int unsigned SRO_FILTER_NS = 50,
  parameter bit          BUF_SPLIT     = 1'b0
) (
  // clock LVDS pads
  input  logic               clk_fast_p,
  input  logic               clk_fast_n,
  input  logic               clk_slow_p,
  input  logic               clk_slow_n,
  // DAQ
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
  // analog front end
  output logic               raz_chn,
  output logic               val_evt,
  input  logic               trigger,
  input  logic [HIT_W-1:0]   hit,
  // readout daisy chain
  input  logic               sro,
  input  logic               sro_b,
  output logic               ero,
  output logic               ero_b,
  output logic [1:0]         data_line,
  output logic [1:0]         txon_line,
  // shared slow-control / probe pads
  input  logic               sc_sel,
  input  logic               sc_din,
  input  logic               sc_clk,
  input  logic               sc_rstb,
  output logic               sc_dout,
  // configuration and power state
  output logic [PROBE_W-1:0] probe_sel,
  output sc_cfg_t            cfg,
  output logic [1:0]         clk_on,
  output logic [1:0]         lvds_on
);

  // ---------------- slow control and probe registers -------------------
  logic sc_din_r, sc_clk_r, sc_rstb_r, sc_dout_r;
  logic pr_din_r, pr_clk_r, pr_rstb_r, pr_dout_r;
  logic [SC_W-1:0] sc_q;

  sc_pad_mux u_pad_mux (
    .pad_sel (sc_sel),  .pad_din (sc_din), .pad_clk (sc_clk),
    .pad_rstb(sc_rstb), .pad_dout(sc_dout),
    .sc_din  (sc_din_r), .sc_clk(sc_clk_r), .sc_rstb(sc_rstb_r), .sc_dout(sc_dout_r),
    .pr_din  (pr_din_r), .pr_clk(pr_clk_r), .pr_rstb(pr_rstb_r), .pr_dout(pr_dout_r)
  );

  sc_shift_reg #(.W(SC_W), .DEFAULT(SC_DEFAULT)) u_sc_reg (
    .clk(sc_clk_r), .rstb(sc_rstb_r), .din(sc_din_r),
    .q(sc_q), .last_bit(), .dout(sc_dout_r)
  );

  sc_shift_reg #(.W(PROBE_W), .DEFAULT('0)) u_probe_reg (
    .clk(pr_clk_r), .rstb(pr_rstb_r), .din(pr_din_r),
    .q(probe_sel), .last_bit(), .dout(pr_dout_r)
  );

  assign cfg = sc_cfg_t'(sc_q);

  // ---------------- clocks and Power On Digital ------------------------
  logic clk_fast_raw, clk_slow_raw, clk_fast, clk_slow;
  logic sro_int, sro_filt, ero_int, sro_start_int, sro_start_unused;

  lvds_receiver #(.START_NS(LVDS_START_NS)) u_rx_fast (
    .in_p(clk_fast_p), .in_n(clk_fast_n), .start(lvds_on[0]), .out(clk_fast_raw)
  );
  lvds_receiver #(.START_NS(LVDS_START_NS)) u_rx_slow (
    .in_p(clk_slow_p), .in_n(clk_slow_n), .start(lvds_on[1]), .out(clk_slow_raw)
  );

  // StartReadOut reaches the PODs asynchronously, through a low-pass filter
  // that keeps glitches from waking the chip
  sro_lowpass_filter #(.TAU_NS(SRO_FILTER_NS)) u_sro_filter (
    .in(sro_int), .out(sro_filt)
  );

  pod u_pod_fast (
    .clkin(clk_fast_raw), .power_on_digital(power_on_digital),
    .start_readout(sro_filt), .end_readout(ero_int),
    .rstb(rstb), .enable(cfg.pod_enable), .use_ext_sro(cfg.pod_ext_sro),
    .start_lvds(lvds_on[0]), .enable_clock(clk_on[0]), .clkout(clk_fast),
    .start_readout_int(sro_start_unused)
  );
  pod u_pod_slow (
    .clkin(clk_slow_raw), .power_on_digital(power_on_digital),
    .start_readout(sro_filt), .end_readout(ero_int),
    .rstb(rstb), .enable(cfg.pod_enable), .use_ext_sro(cfg.pod_ext_sro),
    .start_lvds(lvds_on[1]), .enable_clock(clk_on[1]), .clkout(clk_slow),
    .start_readout_int(sro_start_int)
  );

  // The two other LVDS receivers (RazChn/NoTrig and ValEvt) are biased only
  // while PowerOnAnalog is high, during the bunch crossings; their outputs
  // go to the analog front end.
  lvds_receiver #(.START_NS(LVDS_START_NS)) u_rx_raz (
    .in_p(raz_chn_p), .in_n(raz_chn_n), .start(power_on_analog), .out(raz_chn)
  );
  lvds_receiver #(.START_NS(LVDS_START_NS)) u_rx_val (
    .in_p(val_evt_p), .in_n(val_evt_n), .start(power_on_analog), .out(val_evt)
  );

  // ---------------- readout token switches -----------------------------
  ro_bypass u_ro_bypass (
    .sro(sro), .sro_b(sro_b), .ero_int(ero_int),
    .self_byp(cfg.ro_self_byp), .in_byp(cfg.ro_in_byp), .out_byp(cfg.ro_out_byp),
    .sro_int(sro_int), .ero(ero), .ero_b(ero_b)
  );

  // ---------------- memory, phases, conversion -------------------------
  logic conv_busy, data_bit, transmit_on;

  conv_timer #(.ADC_BITS(ADC_W)) u_conv (
    .clk(clk_fast), .rstb(rstb), .start_conv_b(start_conv_b), .busy(conv_busy)
  );

  acq_readout_ctrl #(.FRAMES(FRAMES), .ERO_CYCLES(ERO_CYCLES)) u_ctrl (
    .clk(clk_slow), .rstb(rstb), .chip_id(cfg.chip_id),
    .start_acq(start_acq), .trigger(trigger), .hit(hit),
    .conv_busy(conv_busy), .start_ro(sro_start_int),
    .chip_sat(chip_sat), .data(data_bit), .transmit_on(transmit_on),
    .end_readout(ero_int), .frame_count()
  );

  // ---------------- output buffers --------------------------------------
  bus_buffer #(.SPLIT(BUF_SPLIT)) u_buf_data (
    .d(data_bit), .drive(transmit_on),
    .buf_en({cfg.data_buf1_en, cfg.data_buf0_en}), .line(data_line)
  );
  bus_buffer #(.SPLIT(BUF_SPLIT)) u_buf_txon (
    .d(transmit_on), .drive(transmit_on),
    .buf_en({cfg.tx_buf1_en, cfg.tx_buf0_en}), .line(txon_line)
  );

endmodule
