// tb_ilc_cycle: one whole 200 ms bunch-crossing period of a slab at its
// default sizes (4 chips, 127-frame memories, 12-bit conversion, 40 MHz
// fast and 5 MHz slow clocks), run as the timing budget describes it:
//   * acquisition for 1 ms, common to all chips, with enough triggers to
//     fill every memory (two more than fit, so every chip saturates);
//   * conversion, 4096 fast clocks = 102.4 us, common to all chips;
//   * daisy-chained readout at 5 MHz: each chip sends 127 x 160 bits,
//     4.064 ms with no gap, then hands the token on;
//   * the rest of the 200 ms with every clock and clock receiver off.
// The testbench plays the DAQ.  It integrates, per chip, the time each
// clock enable and each clock-receiver bias is on, and checks the result:
// every chip is clocked only for the common phases plus its own readout,
// so its duty cycle stays a few percent of the period.  It also checks the
// bunch-crossing IDs in the frames against the trigger spacing, and the
// length of each phase against the budget.  The measured working time per
// chip is printed; with full memories it is about 5.2 ms.
module tb_ilc_cycle;
  import roc_pkg::*;
  localparam int      N       = 4;
  localparam int      ACQ_CLK = 5000;        // 1 ms of 5 MHz clocks
  localparam int      SPACING = 39;          // 129 triggers per chip in 1 ms
  localparam realtime PERIOD  = 200ms;
  localparam realtime T_RO    = MEM_FRAMES * FRAME_W * 200ns;   // 4.064 ms
  int checks = 0, failures = 0;

  logic fast = 1'b0, slow = 1'b0;
  logic rstb = 1'b1, pod = 1'b0, start_acq = 1'b0, start_conv_b = 1'b1;
  logic [N-1:0] trigger = '0;
  logic [HIT_W-1:0] hit [N];
  logic sro = 1'b0, sc_sel = 1'b0, sc_din = 1'b0, sc_clk = 1'b0, sc_rstb = 1'b1;
  jumper_t jumper [N+1];
  logic chip_sat, end_readout, sc_dout;
  logic [N-1:0] raz, val;
  logic [1:0] data, transmit_on;
  logic [PROBE_W-1:0] probe_sel [N];
  sc_cfg_t cfg [N];
  logic [1:0] clk_on [N];
  logic [1:0] lvds_on [N];

  roc_slab dut (
    .clk_fast_p(fast), .clk_fast_n(~fast), .clk_slow_p(slow), .clk_slow_n(~slow),
    .rstb(rstb), .power_on_digital(pod), .start_acq(start_acq), .start_conv_b(start_conv_b),
    .chip_sat(chip_sat), .power_on_analog(1'b0),
    .raz_chn_p(1'b0), .raz_chn_n(1'b1), .val_evt_p(1'b0), .val_evt_n(1'b1),
    .raz_chn(raz), .val_evt(val), .trigger(trigger), .hit(hit),
    .start_readout(sro), .end_readout(end_readout), .data(data), .transmit_on(transmit_on),
    .sc_sel(sc_sel), .sc_din(sc_din), .sc_clk(sc_clk), .sc_rstb(sc_rstb), .sc_dout(sc_dout),
    .jumper(jumper), .probe_sel(probe_sel), .cfg(cfg), .clk_on(clk_on), .lvds_on(lvds_on)
  );

  always #12.5ns fast = ~fast;
  always #100ns  slow = ~slow;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #250ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- on-time of every enable, per chip ----------------
  // index 0 fast clock, 1 slow clock
  realtime clk_time [N][2];
  realtime rx_time  [N][2];
  int      wakes    [N];     // rising edges of the slow-clock enable
  for (genvar k = 0; k < N; k++) begin : g_meter
    for (genvar c = 0; c < 2; c++) begin : g_clk
      realtime t_clk, t_rx;
      initial begin clk_time[k][c] = 0; rx_time[k][c] = 0; end
      always @(clk_on[k][c]) begin
        if (clk_on[k][c]) t_clk = $realtime;
        else              clk_time[k][c] += $realtime - t_clk;
      end
      always @(lvds_on[k][c]) begin
        if (lvds_on[k][c]) t_rx = $realtime;
        else               rx_time[k][c] += $realtime - t_rx;
      end
    end
    initial wakes[k] = 0;
    always @(posedge clk_on[k][1]) wakes[k]++;
  end

  // ---------------- slow control: chip IDs ----------------
  task automatic sc_bit(input logic b);
    sc_din = b;
    #500ns sc_clk = 1'b1;
    #500ns sc_clk = 1'b0;
  endtask

  logic [HIT_W-1:0]  exp_hits [N][$];
  logic [BCID_W-1:0] bcid0 [N];
  int                nframes [N];
  realtime           t_first [N], t_last [N];
  realtime           t_cycle, t_acq, t_conv, t_ro_all;
  sc_cfg_t           word;

  initial begin
    logic [FRAME_W-1:0] sh;
    int nbits, k, ntx;
    foreach (jumper[j]) jumper[j] = JMP_NORMAL;
    foreach (hit[j]) hit[j] = '0;
    // power-up: chip reset, and time for a receiver left on to clear itself
    #10ns rstb = 1'b0;
    #100ns rstb = 1'b1;
    #5us;
    #20ns sc_rstb = 1'b0;
    #100ns sc_rstb = 1'b1;
    sc_sel = 1'b1;
    for (int j = N - 1; j >= 0; j--) begin
      word = sc_cfg_t'(SC_DEFAULT);
      word.chip_id = CHIPID_W'(j + 1);
      for (int i = SC_W - 1; i >= 0; i--) sc_bit(word[i]);
    end
    sc_sel = 1'b0;
    for (int j = 0; j < N; j++) check(cfg[j].chip_id == CHIPID_W'(j + 1), "chip ID loaded");
    #10us;

    // ================= the period starts =================
    // the meters count from here on
    for (int j = 0; j < N; j++) begin
      check(clk_on[j] == 2'b00 && lvds_on[j] == 2'b00, "everything off before the period");
      clk_time[j] = '{0, 0};
      rx_time[j]  = '{0, 0};
      wakes[j]    = 0;
    end
    t_cycle = $realtime;
    rstb = 1'b0;
    #10ns pod = 1'b1;
    #2us rstb = 1'b1;
    #1us;
    // ---------------- acquisition, 1 ms ----------------
    @(negedge slow) start_acq = 1'b1;
    t_acq = $realtime;
    repeat (3) @(negedge slow);    // the controller enters acquisition first
    for (int t = 0; t < ACQ_CLK; t++) begin
      for (int j = 0; j < N; j++) begin
        trigger[j] = (t % SPACING == j);
        hit[j] = {$urandom, $urandom, $urandom, $urandom};
        if (trigger[j] && exp_hits[j].size() < MEM_FRAMES) exp_hits[j].push_back(hit[j]);
      end
      @(negedge slow);
    end
    trigger = '0;
    check(chip_sat, "every memory full before the end of the acquisition");
    start_acq = 1'b0;
    t_acq = $realtime - t_acq;
    check(t_acq >= 1ms && t_acq < 1.001ms, $sformatf("acquisition lasted %0t", t_acq));
    foreach (exp_hits[j]) check(exp_hits[j].size() == MEM_FRAMES, "127 frames expected per chip");

    // ---------------- conversion ----------------
    repeat (2) @(negedge slow);
    start_conv_b = 1'b0;
    t_conv = $realtime;
    #200ns start_conv_b = 1'b1;
    @(negedge chip_sat);
    t_conv = $realtime - t_conv;
    check(t_conv >= 102.4us && t_conv <= 103us, $sformatf("conversion took %0t (max 103 us)", t_conv));
    #1us pod = 1'b0;
    #500ns;
    for (int j = 0; j < N; j++)
      check(clk_on[j] == 2'b00 && lvds_on[j] == 2'b00, "clocks off after the conversion");

    // ---------------- daisy-chained readout ----------------
    #3us sro = 1'b1;
    #2us sro = 1'b0;
    t_ro_all = $realtime;
    sh = '0; nbits = 0; ntx = 0;
    foreach (nframes[j]) nframes[j] = 0;
    while (!end_readout && $realtime - t_ro_all < 20ms) begin
      @(negedge slow);
      if (transmit_on[0]) begin
        sh = {sh[FRAME_W-2:0], data[0]};
        nbits++; ntx++;
        if (nbits == FRAME_W) begin
          nbits = 0;
          k = int'(sh[FRAME_W-1 -: CHIPID_W]) - 1;
          if (k < 0 || k >= N) check(1'b0, "frame carries a known chip ID");
          else begin
            if (nframes[k] == 0) begin
              bcid0[k]   = sh[HIT_W +: BCID_W];
              t_first[k] = $realtime;
            end else begin
              check(sh[HIT_W +: BCID_W] - bcid0[k] == BCID_W'(nframes[k] * SPACING),
                    $sformatf("chip %0d frame %0d bunch-crossing ID", k, nframes[k]));
            end
            t_last[k] = $realtime;
            check(exp_hits[k].size() > 0 && sh[HIT_W-1:0] == exp_hits[k][0],
                  $sformatf("chip %0d frame %0d hits", k, nframes[k]));
            if (exp_hits[k].size() > 0) void'(exp_hits[k].pop_front());
            nframes[k]++;
          end
        end
      end
    end
    t_ro_all = $realtime - t_ro_all;
    check(end_readout, "EndReadOut returned to the DAQ");
    check(ntx == N * MEM_FRAMES * FRAME_W, $sformatf("%0d bits read", ntx));
    for (int j = 0; j < N; j++) begin
      realtime span;
      span = t_last[j] - t_first[j] + FRAME_W * 200ns;
      check(nframes[j] == MEM_FRAMES, $sformatf("chip %0d sent %0d frames", j, nframes[j]));
      check(span > T_RO - 1ns && span < T_RO + 1ns,
            $sformatf("chip %0d readout %0t, expected %0t (no gap at 5 MHz)", j, span, T_RO));
      check(j == 0 || t_first[j] > t_last[j-1], $sformatf("chip %0d read after chip %0d", j, j - 1));
    end
    $display("readout of %0d chips: %0.3f ms", N, t_ro_all / 1ms);

    // ---------------- idle until the next period ----------------
    #10us;
    for (int j = 0; j < N; j++)
      check(clk_on[j] == 2'b00 && lvds_on[j] == 2'b00, "everything off after the readout");
    begin
      int w [N];
      foreach (w[j]) w[j] = wakes[j];
      #(PERIOD - ($realtime - t_cycle));
      for (int j = 0; j < N; j++) begin
        check(wakes[j] == w[j], $sformatf("chip %0d stayed off for the rest of the period", j));
        check(clk_on[j] == 2'b00 && lvds_on[j] == 2'b00, "everything off at the end of the period");
      end
    end

    // ---------------- power budget ----------------
    for (int j = 0; j < N; j++) begin
      realtime common, work;
      common = t_acq + t_conv;
      work   = clk_time[j][1];
      $display("chip %0d: slow clock on %0.3f ms, fast clock on %0.3f ms, receivers on %0.3f / %0.3f ms, duty %0.2f %%",
               j, work / 1ms, clk_time[j][0] / 1ms, rx_time[j][0] / 1ms, rx_time[j][1] / 1ms,
               100.0 * work / PERIOD);
      // clocked for the common phases and its own readout, nothing more
      check(work > common + T_RO && work < common + T_RO + 30us,
            $sformatf("chip %0d working time %0t", j, work));
      check(clk_time[j][0] <= work, "fast clock on no longer than the slow one");
      check(rx_time[j][1] >= work && rx_time[j][1] < work + 10us,
            "slow receiver on only while its clock is needed");
      check(rx_time[j][0] < rx_time[j][1] + 10us, "fast receiver on no longer than the slow one");
      check(work < 0.03 * PERIOD, "duty cycle below 3 % of the bunch-crossing period");
      check(wakes[j] == 2, $sformatf("chip %0d woken twice (acquisition, own readout)", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
