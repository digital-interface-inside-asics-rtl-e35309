// tb_roc_chip: one ROC chip through a complete cycle at default sizes:
// reset with PowerOnDigital, slow-control and probe register loading over
// the shared pads (with read-back through the chain output), acquisition,
// 12-bit conversion on the fast clock, clock stop, readout started by
// StartReadOut (a short glitch on it first, which must wake nothing), clock
// stop after EndReadOut.  Checks the frames on the Data
// bus line, the ChipSat sequence, the conversion time, and that the two
// clocks run only when the chip works (fast clock stops first).
module tb_roc_chip;
  import roc_pkg::*;
  int checks = 0, failures = 0;

  logic fast = 1'b0, slow = 1'b0;
  logic rstb = 1'b1, pod = 1'b0, start_acq = 1'b0, start_conv_b = 1'b1, trigger = 1'b0;
  logic [HIT_W-1:0] hit = '0;
  logic sro = 1'b0, sro_b = 1'b0, sc_sel = 1'b0, sc_din = 1'b0, sc_clk = 1'b0, sc_rstb = 1'b1;
  logic chip_sat, ero, ero_b, sc_dout;
  logic poa = 1'b0, raz_in = 1'b0, val_in = 1'b0, raz, val;
  logic [1:0] data_line, txon_line, clk_on, lvds_on;
  logic [PROBE_W-1:0] probe_sel;
  sc_cfg_t cfg, cfg_load;

  roc_chip dut (
    .clk_fast_p(fast), .clk_fast_n(~fast), .clk_slow_p(slow), .clk_slow_n(~slow),
    .rstb(rstb), .power_on_digital(pod), .start_acq(start_acq), .start_conv_b(start_conv_b),
    .chip_sat(chip_sat), .power_on_analog(poa),
    .raz_chn_p(raz_in), .raz_chn_n(~raz_in), .val_evt_p(val_in), .val_evt_n(~val_in),
    .raz_chn(raz), .val_evt(val), .trigger(trigger), .hit(hit),
    .sro(sro), .sro_b(sro_b), .ero(ero), .ero_b(ero_b),
    .data_line(data_line), .txon_line(txon_line),
    .sc_sel(sc_sel), .sc_din(sc_din), .sc_clk(sc_clk), .sc_rstb(sc_rstb), .sc_dout(sc_dout),
    .probe_sel(probe_sel), .cfg(cfg), .clk_on(clk_on), .lvds_on(lvds_on)
  );

  always #12.5ns fast = ~fast;
  always #100ns  slow = ~slow;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shift one bit on the shared slow-control pads (1 MHz clock); out is
  // the chain output just before the rising edge
  logic sc_out_bit;
  task automatic sc_bit(input logic b);
    sc_din = b;
    #500ns sc_out_bit = sc_dout;
    sc_clk = 1'b1;
    #500ns sc_clk = 1'b0;
  endtask

  logic [HIT_W-1:0] hits [$];
  logic [FRAME_W-1:0] got;
  logic [BCID_W-1:0] last_bcid;
  logic [SC_W-1:0] readback;
  realtime t0, t_conv;
  int nbits, nframes, nero;

  initial begin
    // ---------------- reset, PowerOnDigital ----------------
    #20ns rstb = 1'b0; sc_rstb = 1'b0;
    #10ns pod = 1'b1;
    #1ns check(lvds_on == 2'b11, "PowerOnDigital starts both receivers");
    #2us rstb = 1'b1; sc_rstb = 1'b1;
    check(cfg == sc_cfg_t'(SC_DEFAULT), "slow control at its default after reset");
    check(probe_sel == '0, "probe register at its default");

    // ---------------- slow control ----------------
    cfg_load = sc_cfg_t'(SC_DEFAULT);
    cfg_load.chip_id = 8'h42;
    sc_sel = 1'b1;
    for (int i = SC_W - 1; i >= 0; i--) sc_bit(cfg_load[i]);
    check(cfg == cfg_load, "slow control loaded");
    // push a second word through: the first one comes back out of the chain
    for (int i = SC_W - 1; i >= 0; i--) begin
      sc_bit(cfg_load[i]);
      readback = {readback[SC_W-2:0], sc_out_bit};
    end
    check(readback == cfg_load, $sformatf("slow control read back %h through the chain output", readback));
    sc_sel = 1'b0;
    for (int i = 0; i < PROBE_W; i++) sc_bit(1'(i % 3 == 0));
    check(probe_sel == 8'b1001_0010, $sformatf("probe register loaded %b", probe_sel));
    check(cfg == cfg_load, "slow control unchanged while the probe register is selected");

    // ---------------- analog receivers ----------------
    raz_in = 1'b1; val_in = 1'b1;
    #1us check(raz == 1'b0 && val == 1'b0, "RazChn/ValEvt receivers off without PowerOnAnalog");
    poa = 1'b1;
    #1us check(raz == 1'b1 && val == 1'b1, "RazChn/ValEvt received during PowerOnAnalog");
    raz_in = 1'b0;
    #10ns check(raz == 1'b0 && val == 1'b1, "RazChn follows its pads");
    val_in = 1'b0;

    // ---------------- acquisition ----------------
    @(negedge slow) start_acq = 1'b1;
    repeat (5) @(negedge slow);
    for (int t = 0; t < 6; t++) begin
      trigger = 1'b1;
      hit = {$urandom, $urandom, $urandom, $urandom};
      hits.push_back(hit);
      @(negedge slow) trigger = 1'b0;
      repeat (t + 2) @(negedge slow);
    end
    check(chip_sat == 1'b0, "no ChipSat during a short acquisition");
    start_acq = 1'b0;
    poa = 1'b0;
    repeat (2) @(negedge slow);
    check(chip_sat == 1'b1, "ChipSat at the end of the acquisition");
    val_in = 1'b1;
    #1ns check(val == 1'b0, "receivers off again after PowerOnAnalog");
    val_in = 1'b0;

    // ---------------- conversion ----------------
    start_conv_b = 1'b0;
    t0 = $realtime;
    #200ns start_conv_b = 1'b1;
    @(negedge chip_sat);
    t_conv = $realtime - t0;
    check(t_conv >= 102.4us && t_conv < 104us, $sformatf("conversion took %0t", t_conv));
    #1us pod = 1'b0;
    t0 = $realtime;
    wait (clk_on == 2'b00);
    check($realtime - t0 <= 400ns, "clocks stopped within two slow ticks");
    check(lvds_on == 2'b00, "receivers stopped with the clocks");
    #5us check(clk_on == 2'b00 && lvds_on == 2'b00, "chip idle between phases");

    // ---------------- readout ----------------
    // a glitch on StartReadOut is filtered out and wakes nothing
    sro = 1'b1;
    #20ns sro = 1'b0;
    #2us check(clk_on == 2'b00 && lvds_on == 2'b00, "StartReadOut glitch ignored");
    sro = 1'b1;
    #1ns check(lvds_on == 2'b00, "StartReadOut held by the filter");
    #100ns check(lvds_on == 2'b11, "StartReadOut starts both receivers after the filter delay");
    check(clk_on == 2'b00, "clocks not yet enabled");
    #1.9us sro = 1'b0;
    nbits = 0; nframes = 0; last_bcid = '0;
    while (!ero) begin
      @(negedge slow);
      check(txon_line[0] == data_line[0] || data_line[0] == 1'b0 || txon_line[0],
            "Data only while TransmitOn");
      if (txon_line[0]) begin
        got = {got[FRAME_W-2:0], data_line[0]};
        nbits++;
        if (nbits % FRAME_W == 0) begin
          check(got[FRAME_W-1 -: CHIPID_W] == 8'h42, "chip ID in frame");
          check(hits.size() > 0 && got[HIT_W-1:0] == hits[0], $sformatf("hits of frame %0d", nframes));
          check(nframes == 0 || got[HIT_W +: BCID_W] > last_bcid, "bunch-crossing IDs increase");
          last_bcid = got[HIT_W +: BCID_W];
          if (hits.size() > 0) void'(hits.pop_front());
          nframes++;
        end
      end
    end
    check(nframes == 6 && nbits == 6 * FRAME_W, $sformatf("%0d frames read", nframes));
    nero = 0;
    while (ero) begin
      @(negedge slow) nero++;
      check(clk_on[1] == 1'b1, "slow clock runs through EndReadOut");
    end
    check(nero == 8, "EndReadOut pulse of 8 slow clocks");
    fork
      begin wait (clk_on[0] == 1'b0); t0 = $realtime; end
      begin wait (clk_on[1] == 1'b0); t_conv = $realtime; end
    join
    check(t0 <= t_conv, "fast clock stops no later than the slow clock");
    #2us check(clk_on == 2'b00 && lvds_on == 2'b00, "chip idle after its readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
