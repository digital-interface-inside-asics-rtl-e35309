// tb_conv_timer: checks the conversion timer at its default 12 bits on a
// 40 MHz clock: busy starts three clocks after StartConversion_b falls,
// lasts exactly 4096 clocks (102.4 us, within the 103 us of a 12-bit
// conversion at 40 MHz), and a start during a conversion is ignored.
module tb_conv_timer;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rstb = 1'b1, start_conv_b = 1'b1, busy;
  int   cyc = 0, t_start, t_rise, t_fall;
  realtime r_rise, r_fall;

  conv_timer dut (.*);

  always #12.5ns clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ns rstb = 1'b0;
    #50ns rstb = 1'b1;
    check(busy == 1'b0, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start_conv_b = 1'b0;
      t_start = cyc;
      repeat (2) @(negedge clk);
      start_conv_b = 1'b1;
      @(posedge busy);
      t_rise = cyc; r_rise = $realtime;
      check(t_rise - t_start == 3, $sformatf("busy latency %0d clocks", t_rise - t_start));
      // a second start during the conversion must not restart it
      repeat (100) @(negedge clk);
      start_conv_b = 1'b0;
      repeat (3) @(negedge clk);
      start_conv_b = 1'b1;
      @(negedge busy);
      t_fall = cyc; r_fall = $realtime;
      check(t_fall - t_rise == 4096, $sformatf("conversion length %0d clocks", t_fall - t_rise));
      check(r_fall - r_rise <= 103us, "conversion within 103 us");
      repeat (20) @(negedge clk);
      check(busy == 1'b0, "idle after the conversion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
