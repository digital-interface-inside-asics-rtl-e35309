// tb_sro_lowpass_filter: checks the StartReadOut filter model at its
// default time constant (50 ns).
//   * glitches shorter than the time constant (1 to 45 ns, single and in
//     bursts) never reach the output, from either level;
//   * a level held long enough always passes, after a delay between one
//     and two time constants (the model gives exactly one), and a long
//     pulse keeps its width to within one time constant;
//   * random pulse widths: under one time constant rejected, over two
//     passed;
//   * the output is compared with an independent reference at every step:
//     it may change only to a value the input has held for a whole time
//     constant.
module tb_sro_lowpass_filter;
  localparam int unsigned TAU = 50;
  int checks = 0, failures = 0;

  logic in = 1'b0;
  logic out;

  sro_lowpass_filter #(.TAU_NS(TAU)) dut (.in(in), .out(out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: every output change must follow an input level held for at
  // least one time constant
  realtime t_in;
  always begin
    @(in);
    t_in = $realtime;
  end
  always @(out) if ($realtime > 0) begin
    check(out == in && $realtime - t_in >= TAU * 1ns,
          $sformatf("output changed to %b after a stable input of %0t", out, $realtime - t_in));
  end

  bit seen_high = 1'b0;
  always @(posedge out) seen_high = 1'b1;

  // hold the output still for a while and check it
  task automatic expect_still(input logic v, input realtime span);
    realtime t0;
    t0 = $realtime;
    while ($realtime - t0 < span) begin
      #1ns;
      if (out != v) begin
        check(1'b0, $sformatf("output moved to %b", out));
        return;
      end
    end
    check(1'b1, "output still");
  endtask

  // a level change: measure the delay until the output follows
  task automatic step(input logic v, output realtime delay);
    realtime t0;
    in = v;
    t0 = $realtime;
    wait (out == v);
    delay = $realtime - t0;
    check(delay >= TAU * 1ns && delay <= 2 * TAU * 1ns,
          $sformatf("level %b passed after %0t", v, delay));
  endtask

  initial begin
    realtime d_rise, d_fall, t_rise;
    int w;
    #100ns check(out == 1'b0, "output low at start");

    // single glitches from the low level
    for (int i = 0; i < 20; i++) begin
      w = 1 + $urandom_range(0, TAU - 6);
      in = 1'b1;
      #(w * 1ns) in = 1'b0;
      expect_still(1'b0, 3 * TAU * 1ns);
    end
    // bursts of short glitches (each shorter than TAU)
    for (int i = 0; i < 10; i++) begin
      repeat (5) begin
        in = 1'b1;
        #($urandom_range(1, TAU - 5) * 1ns) in = 1'b0;
        #($urandom_range(1, 20) * 1ns);
      end
      expect_still(1'b0, 3 * TAU * 1ns);
    end

    // a long pulse passes, width kept
    step(1'b1, d_rise);
    t_rise = $realtime - d_rise;
    #1us;
    step(1'b0, d_fall);
    check(d_fall - d_rise < TAU * 1ns && d_rise - d_fall < TAU * 1ns,
          $sformatf("pulse width kept (rise %0t, fall %0t)", d_rise, d_fall));
    #200ns;

    // glitches from the high level
    step(1'b1, d_rise);
    #200ns;
    for (int i = 0; i < 20; i++) begin
      w = 1 + $urandom_range(0, TAU - 6);
      in = 1'b0;
      #(w * 1ns) in = 1'b1;
      expect_still(1'b1, 3 * TAU * 1ns);
    end
    step(1'b0, d_fall);

    // random pulses of every width: long ones pass, short ones do not
    for (int i = 0; i < 40; i++) begin
      w = $urandom_range(1, 4 * TAU);
      if (w == TAU) w++;             // exactly TAU is a race by definition
      #300ns;
      seen_high = 1'b0;
      in = 1'b1;
      #(w * 1ns) in = 1'b0;
      #(3 * TAU * 1ns);
      check(out == 1'b0, "output back low after the pulse");
      if (w < TAU)      check(!seen_high, $sformatf("%0d ns pulse rejected", w));
      if (w >= 2 * TAU) check(seen_high, $sformatf("%0d ns pulse passed", w));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
