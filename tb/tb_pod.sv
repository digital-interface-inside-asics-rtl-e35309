// tb_pod: checks the Power On Digital block with a clock LVDS receiver
// model (500 ns start-up) on a 5 MHz clock.
//  - PowerOnDigital starts the receiver at once (asynchronous set), forces
//    the clock, and on release stops receiver and clock together within two
//    clock ticks (synchronous release).
//  - A StartReadOut pulse starts the receiver at once; the clock is enabled
//    only after the pulse has ended, then a StartReadOutInt pulse of one
//    clock follows; the clock keeps running through the EndReadOut pulse
//    and stops within two ticks of its end.
//  - With the POD readout control disabled, StartReadOut starts nothing;
//    with use_ext_sro, StartReadOutInt is StartReadOut itself.
//  - ClkOut never has a short (glitch) high or low phase.
module tb_pod;
  int checks = 0, failures = 0;
  logic pad_clk = 1'b0;
  logic power_on_digital = 1'b0, start_readout = 1'b0, end_readout = 1'b0;
  logic rstb = 1'b1, enable = 1'b1, use_ext_sro = 1'b0;
  logic clkin, start_lvds, enable_clock, clkout, start_readout_int;
  realtime t_rise, t_fall, t0;
  int n_sro_int_edges;

  lvds_receiver #(.START_NS(500)) u_rx (
    .in_p(pad_clk), .in_n(~pad_clk), .start(start_lvds), .out(clkin)
  );
  pod dut (.*);

  always #100ns pad_clk = ~pad_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // glitch monitor: every phase of ClkOut lasts a full half period
  always @(posedge clkout) begin
    t_rise = $realtime;
    if (t_fall > 0) check($realtime - t_fall >= 99ns, "ClkOut low phase too short");
  end
  always @(negedge clkout) begin
    t_fall = $realtime;
    check($realtime - t_rise >= 99ns, "ClkOut high phase too short");
  end
  always @(posedge start_readout_int) n_sro_int_edges++;

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- reset phase with PowerOnDigital (acquisition / conversion) ----
    #50ns rstb = 1'b0;
    #10ns power_on_digital = 1'b1;
    #1ns check(start_lvds == 1'b1, "PowerOnDigital starts the LVDS receiver at once");
    check(enable_clock == 1'b1, "PowerOnDigital enables the clock");
    #2us rstb = 1'b1;
    check(clkin !== 1'b0 || clkout == clkin, "clock delivered");
    #5us;
    @(posedge pad_clk);
    #1ns check(clkout == 1'b1, "clock runs during acquisition");
    // release: within two ticks, receiver and clock together
    #37ns power_on_digital = 1'b0;
    t0 = $realtime;
    @(negedge enable_clock);
    check($realtime - t0 <= 400ns, "clock released within two ticks");
    check(start_lvds == 1'b0, "receiver stopped with the clock");
    #3us;
    check(clkout == 1'b0 && clkin == 1'b0 && start_lvds == 1'b0, "everything off between phases");

    // ---- readout ----
    #123ns start_readout = 1'b1;
    #1ns check(start_lvds == 1'b1, "StartReadOut starts the receiver asynchronously");
    check(enable_clock == 1'b0, "clock not yet enabled");
    #1500ns;
    check(enable_clock == 1'b0, "clock stays off while StartReadOut is high");
    start_readout = 1'b0;
    t0 = $realtime;
    @(posedge enable_clock);
    check($realtime - t0 <= 700ns, "clock enabled soon after StartReadOut ends");
    @(posedge start_readout_int);
    check(clkin == 1'b0, "StartReadOutInt set on a falling clock edge");
    @(posedge clkout);
    check(start_readout_int == 1'b1, "StartReadOutInt seen by a rising ClkOut edge");
    @(negedge start_readout_int);
    check(n_sro_int_edges == 1, "one StartReadOutInt pulse");
    // the chip reads out for a while, then raises EndReadOut for 8 clocks
    repeat (30) @(posedge clkout);
    check(enable_clock == 1'b1, "clock runs during the readout");
    end_readout <= 1'b1;
    repeat (8) @(posedge clkout);
    check(enable_clock == 1'b1, "clock runs through the EndReadOut pulse");
    end_readout <= 1'b0;
    t0 = $realtime;
    @(negedge enable_clock);
    check($realtime - t0 <= 400ns, "clock stopped within two ticks of the end of EndReadOut");
    check(start_lvds == 1'b0, "receiver stopped with the clock");
    #2us check(clkout == 1'b0, "clock stays stopped");

    // ---- readout control disabled ----
    enable = 1'b0;
    #300ns start_readout = 1'b1;
    #1us check(start_lvds == 1'b0 && enable_clock == 1'b0, "disabled POD ignores StartReadOut");
    start_readout = 1'b0;
    // ---- pass-through of StartReadOut ----
    use_ext_sro = 1'b1;
    #100ns start_readout = 1'b1;
    #1ns check(start_readout_int == 1'b1, "external StartReadOut passed through");
    #100ns start_readout = 1'b0;
    #1ns check(start_readout_int == 1'b0, "external StartReadOut passed through (low)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
