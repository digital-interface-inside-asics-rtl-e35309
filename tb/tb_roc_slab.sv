// tb_roc_slab: end-to-end test of a slab of ROC chips, all parameters at
// their defaults (4 chips, 127-frame memories, 12-bit conversion).
// The testbench plays the DAQ and the analog front ends.
//
// Cycle 1 (all chips working):
//   reset with PowerOnDigital; slow control of the whole chain loaded and
//   read back; probe registers loaded through the same pads; acquisition in
//   which chip 2 receives more triggers than its memory holds (ChipSat
//   during acquisition); conversion; clocks stopped; daisy-chained readout
//   of all chips in order, frames checked, each chip clocked only around
//   its own readout.
// Cycle 2 (chip 1 declared dead, chip 3 bypassing itself, chip 0 using its
// extra buffers):
//   the slow-control chain skips chip 1 through the PCB jumpers; chip 0
//   sends its EndReadOut on the bypass line and chip 2 starts from it; chip
//   3 passes the token straight on; only chips 0 and 2 are read.
// Before each readout, a glitch on StartReadOut must wake no chip.
// Every mechanism listed in the counters at the end must have happened at
// least once.
module tb_roc_slab;
  import roc_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;

  logic fast = 1'b0, slow = 1'b0;
  logic rstb = 1'b1, pod = 1'b0, start_acq = 1'b0, start_conv_b = 1'b1;
  logic [N-1:0] trigger = '0;
  logic [HIT_W-1:0] hit [N];
  logic sro = 1'b0, sc_sel = 1'b0, sc_din = 1'b0, sc_clk = 1'b0, sc_rstb = 1'b1;
  jumper_t jumper [N+1];
  logic chip_sat, end_readout, sc_dout;
  logic poa = 1'b0, raz_in = 1'b0, val_in = 1'b0;
  logic [N-1:0] raz, val;
  logic [1:0] data, transmit_on;
  logic [PROBE_W-1:0] probe_sel [N];
  sc_cfg_t cfg [N];
  logic [1:0] clk_on [N];
  logic [1:0] lvds_on [N];

  roc_slab dut (
    .clk_fast_p(fast), .clk_fast_n(~fast), .clk_slow_p(slow), .clk_slow_n(~slow),
    .rstb(rstb), .power_on_digital(pod), .start_acq(start_acq), .start_conv_b(start_conv_b),
    .chip_sat(chip_sat), .power_on_analog(poa),
    .raz_chn_p(raz_in), .raz_chn_n(~raz_in), .val_evt_p(val_in), .val_evt_n(~val_in),
    .raz_chn(raz), .val_evt(val), .trigger(trigger), .hit(hit),
    .start_readout(sro), .end_readout(end_readout), .data(data), .transmit_on(transmit_on),
    .sc_sel(sc_sel), .sc_din(sc_din), .sc_clk(sc_clk), .sc_rstb(sc_rstb), .sc_dout(sc_dout),
    .jumper(jumper), .probe_sel(probe_sel), .cfg(cfg), .clk_on(clk_on), .lvds_on(lvds_on)
  );

  always #12.5ns fast = ~fast;
  always #100ns  slow = ~slow;

  // mechanism counters
  int n_default = 0, n_sc_chain = 0, n_probe_mode = 0, n_mem_full = 0, n_conversion = 0;
  int n_clock_stop = 0, n_token = 0, n_gated_idle = 0, n_neighbour_bypass = 0;
  int n_self_bypass = 0, n_jumper_bypass = 0, n_extra_buffer = 0, n_analog_rx = 0;
  int n_sro_filter = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- slow control helpers ----------------
  logic sc_out_bit;
  task automatic sc_bit(input logic b);
    sc_din = b;
    #500ns sc_out_bit = sc_dout;
    sc_clk = 1'b1;
    #500ns sc_clk = 1'b0;
  endtask

  // load the chips listed in order[] (chain order, first = next to the DAQ)
  // and read the whole stream back through the chain output
  task automatic sc_load(input int order [$], input sc_cfg_t words [N]);
    logic stream [$];
    logic back [$];
    for (int j = order.size() - 1; j >= 0; j--)
      for (int i = SC_W - 1; i >= 0; i--) stream.push_back(words[order[j]][i]);
    sc_sel = 1'b1;
    foreach (stream[b]) sc_bit(stream[b]);
    foreach (order[j])
      check(cfg[order[j]] == words[order[j]], $sformatf("chip %0d configured", order[j]));
    foreach (stream[b]) begin
      sc_bit(stream[b]);
      back.push_back(sc_out_bit);
    end
    check(back == stream, "slow-control stream read back at the end of the chain");
    if (back == stream) n_sc_chain++;
    sc_sel = 1'b0;
  endtask

  // ---------------- frame bookkeeping ----------------
  logic [HIT_W-1:0] exp_hits [N][$];
  int reading_chip;

  // one acquisition: ntrig[k] triggers for chip k, one per slow clock
  task automatic acquire(input int ntrig [N]);
    int maxt;
    bit sat_seen = 0;
    maxt = 0;
    foreach (ntrig[k]) if (ntrig[k] > maxt) maxt = ntrig[k];
    // reset phase with PowerOnDigital (longer than the LVDS start-up)
    rstb = 1'b0;
    #10ns pod = 1'b1;
    #2us rstb = 1'b1;
    #1us;
    // bunch-crossing train: analog receivers on
    poa = 1'b1;
    raz_in = 1'b1;
    check(raz == '0, "RazChn receivers still starting");
    #1us check(raz == '1, "RazChn received by every chip during PowerOnAnalog");
    if (raz == '1) n_analog_rx++;
    raz_in = 1'b0;
    @(negedge slow) start_acq = 1'b1;
    repeat (3) @(negedge slow);
    for (int t = 0; t < maxt; t++) begin
      for (int k = 0; k < N; k++) begin
        trigger[k] = (t < ntrig[k]);
        hit[k] = {$urandom, $urandom, $urandom, $urandom};
        if (t < ntrig[k] && exp_hits[k].size() < MEM_FRAMES) exp_hits[k].push_back(hit[k]);
      end
      @(negedge slow);
      if (chip_sat) sat_seen = 1;
    end
    trigger = '0;
    repeat (2) @(negedge slow);
    if (sat_seen) n_mem_full++;
    start_acq = 1'b0;
    poa = 1'b0;
    val_in = 1'b1;
    repeat (2) @(negedge slow);
    check(chip_sat == 1'b1, "ChipSat at the end of the acquisition");
    check(val == '0, "ValEvt receivers off outside PowerOnAnalog");
    val_in = 1'b0;
  endtask

  task automatic convert_and_stop();
    realtime t0, tc;
    start_conv_b = 1'b0;
    t0 = $realtime;
    #200ns start_conv_b = 1'b1;
    @(negedge chip_sat);
    tc = $realtime - t0;
    check(tc >= 102.4us && tc < 104us, $sformatf("conversion took %0t", tc));
    n_conversion++;
    #1us pod = 1'b0;
    #500ns;
    for (int k = 0; k < N; k++)
      check(clk_on[k] == 2'b00 && lvds_on[k] == 2'b00, $sformatf("chip %0d clocks stopped", k));
    n_clock_stop++;
  endtask

  // daisy-chained readout; expect[] lists the chips whose frames must come,
  // in order
  logic [N-1:0] clocked_in_readout;
  realtime t_ro;
  int tx_per_chip [N];
  task automatic readout(input int expect_order [$]);
    logic [FRAME_W-1:0] sh;
    int nbits, pos, k, ntx;
    int total_exp;
    sh = '0; nbits = 0; pos = 0; ntx = 0;
    clocked_in_readout = '0;
    total_exp = 0;
    foreach (expect_order[j]) total_exp += exp_hits[expect_order[j]].size();
    foreach (tx_per_chip[j]) tx_per_chip[j] = 0;
    // a glitch on the DAQ's StartReadOut is filtered out in chips 0 and 1
    #3us sro = 1'b1;
    #20ns sro = 1'b0;
    #2us;
    for (int j = 0; j < N; j++)
      check(clk_on[j] == 2'b00 && lvds_on[j] == 2'b00, $sformatf("chip %0d ignores a StartReadOut glitch", j));
    if (lvds_on[0] == 2'b00) n_sro_filter++;
    #1us sro = 1'b1;
    #2us sro = 1'b0;
    t_ro = $realtime;
    while (!end_readout) begin
      if ($realtime - t_ro > 10ms) begin
        check(1'b0, "EndReadOut never returned to the DAQ");
        break;
      end
      @(negedge slow);
      for (int j = 0; j < N; j++) if (clk_on[j][1]) clocked_in_readout[j] = 1'b1;
      if (transmit_on[0]) begin
        sh = {sh[FRAME_W-2:0], data[0]};
        nbits++; ntx++;
        if (nbits == FRAME_W) begin
          nbits = 0;
          k = int'(sh[FRAME_W-1 -: CHIPID_W]) - 1;
          check(k >= 0 && k < N, "frame carries a known chip ID");
          if (k >= 0 && k < N) begin
            while (pos < expect_order.size() && expect_order[pos] != k) begin
              check(exp_hits[expect_order[pos]].size() == 0,
                    $sformatf("chip %0d read completely before the next", expect_order[pos]));
              pos++;
            end
            check(pos < expect_order.size(), $sformatf("chip %0d read in order", k));
            check(exp_hits[k].size() > 0 && sh[HIT_W-1:0] == exp_hits[k][0],
                  $sformatf("frame of chip %0d", k));
            if (exp_hits[k].size() > 0) void'(exp_hits[k].pop_front());
            tx_per_chip[k] += FRAME_W;
            // power: only the reading chip (and the next, starting) is clocked
            for (int j = 0; j < N; j++)
              if (j != k && j != k + 1) begin
                check(clk_on[j][1] == 1'b0, $sformatf("chip %0d clock gated off", j));
                n_gated_idle++;
              end
          end
        end
      end
    end
    n_token++;
    check(ntx == total_exp * FRAME_W,
          $sformatf("%0d bits sent, expected %0d (one bit per 5 MHz clock)", ntx, total_exp * FRAME_W));
    foreach (tx_per_chip[j])
      if (tx_per_chip[j] > 0)
        $display("chip %0d: %0d frames, %0d bits = %0.3f ms at 5 MHz", j,
                 tx_per_chip[j] / FRAME_W, tx_per_chip[j], tx_per_chip[j] * 200.0e-6);
    foreach (expect_order[j])
      check(exp_hits[expect_order[j]].size() == 0, $sformatf("all frames of chip %0d read", expect_order[j]));
    #5us;
    for (int j = 0; j < N; j++)
      check(clk_on[j] == 2'b00 && lvds_on[j] == 2'b00, $sformatf("chip %0d idle after readout", j));
  endtask

  sc_cfg_t words [N];
  int ntrig [N];

  initial begin
    foreach (jumper[j]) jumper[j] = JMP_NORMAL;
    foreach (hit[k]) hit[k] = '0;
    // ---------------- power-up defaults ----------------
    #20ns sc_rstb = 1'b0;
    #100ns sc_rstb = 1'b1;
    for (int k = 0; k < N; k++)
      check(cfg[k] == sc_cfg_t'(SC_DEFAULT) && probe_sel[k] == '0, "default configuration");
    n_default++;

    // ================= cycle 1: all chips =================
    for (int k = 0; k < N; k++) begin
      words[k] = sc_cfg_t'(SC_DEFAULT);
      words[k].chip_id = CHIPID_W'(k + 1);
    end
    sc_load('{0, 1, 2, 3}, words);
    // probe registers through the same pads (Select low)
    for (int b = 0; b < N * PROBE_W; b++) sc_bit(1'(b % 5 == 0));
    for (int k = 0; k < N; k++) check(cfg[k] == words[k], "slow control kept in probe mode");
    check(probe_sel[N-1][PROBE_W-1] == 1'b1 && probe_sel[0][0] == 1'b0, "probe chain loaded");
    n_probe_mode++;

    ntrig = '{5, 3, 130, 2};
    acquire(ntrig);
    convert_and_stop();
    readout('{0, 1, 2, 3});

    // ================= cycle 2: chip 1 dead =================
    jumper[1] = JMP_REMOVED;     // dead chip's input left open
    jumper[2] = JMP_BYPASS;      // chip 2 reads chip 0
    words[0].ro_out_byp   = 1'b1;
    words[0].data_buf0_en = 1'b0;  words[0].data_buf1_en = 1'b1;
    words[0].tx_buf0_en   = 1'b0;  words[0].tx_buf1_en   = 1'b1;
    words[2].ro_in_byp    = 1'b1;
    words[3].ro_self_byp  = 1'b1;
    sc_load('{0, 2, 3}, words);
    n_jumper_bypass++;
    check(cfg[1].pod_enable == 1'b0 && cfg[1].data_buf0_en == 1'b0, "skipped chip left unconfigured");
    ntrig = '{4, 0, 6, 0};
    acquire(ntrig);
    convert_and_stop();
    readout('{0, 2});
    // chip 2 was started from the bypass line, chips 1 and 3 never started
    check(clocked_in_readout == 4'b0101, $sformatf("chips clocked in readout %b", clocked_in_readout));
    if (clocked_in_readout[2] && !clocked_in_readout[1]) n_neighbour_bypass++;
    if (!clocked_in_readout[3]) n_self_bypass++;
    if (clocked_in_readout[0] && !cfg[0].data_buf0_en && !cfg[0].tx_buf0_en) n_extra_buffer++;

    // ---------------- every mechanism happened ----------------
    $display("mechanisms: default=%0d sc_chain=%0d probe_mode=%0d mem_full=%0d conversion=%0d",
             n_default, n_sc_chain, n_probe_mode, n_mem_full, n_conversion);
    $display("            clock_stop=%0d token=%0d gated_idle=%0d neighbour_bypass=%0d",
             n_clock_stop, n_token, n_gated_idle, n_neighbour_bypass);
    $display("            self_bypass=%0d jumper_bypass=%0d extra_buffer=%0d",
             n_self_bypass, n_jumper_bypass, n_extra_buffer);
    $display("            analog_receivers=%0d sro_filter=%0d", n_analog_rx, n_sro_filter);
    check(n_default > 0 && n_sc_chain > 1 && n_probe_mode > 0 && n_mem_full > 0, "mechanisms 1");
    check(n_conversion > 0 && n_clock_stop > 0 && n_token > 1 && n_gated_idle > 0, "mechanisms 2");
    check(n_neighbour_bypass > 0 && n_self_bypass > 0 && n_jumper_bypass > 0 && n_extra_buffer > 0
          && n_analog_rx > 0 && n_sro_filter > 0,
          "mechanisms 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
