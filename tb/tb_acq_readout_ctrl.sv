// tb_acq_readout_ctrl: checks the memory and phase controller of one chip
// at full size (127 frames of 160 bits) on a free-running 5 MHz clock.
//  run 0: a few triggers with random hits; ChipSat rises when the
//         acquisition ends and falls after the conversion; the readout
//         sends exactly the stored frames (chip ID, bunch-crossing ID,
//         hits), one bit per clock, with no frame that was not written;
//  run 1: more triggers than the memory holds; ChipSat rises during the
//         acquisition as soon as 127 frames are stored, and the readout
//         takes exactly 127 x 160 clocks (4.06 ms at 5 MHz);
//  run 2: no trigger; the readout only returns EndReadOut.
// The bunch-crossing ID expected for a trigger is the number of clocks
// since the acquisition started, counted here independently.
module tb_acq_readout_ctrl;
  import roc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rstb = 1'b1;
  logic [CHIPID_W-1:0] chip_id = 8'h5A;
  logic start_acq = 1'b0, trigger = 1'b0, conv_busy = 1'b0, start_ro = 1'b0;
  logic [HIT_W-1:0] hit = '0;
  logic chip_sat, data, transmit_on, end_readout;
  logic [MEM_ADDR_W-1:0] frame_count;

  acq_readout_ctrl dut (.*);

  always #100ns clk = ~clk;

  logic [FRAME_W-1:0] expected [$];
  logic [FRAME_W-1:0] got;
  int acq_cyc, nbits, ntx, nero;
  bit full_seen;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one acquisition with ntrig triggers spread over the window
  task automatic acquire(input int ntrig, input int gap);
    @(negedge clk) start_acq = 1'b1;
    @(posedge clk);                 // controller enters the acquisition
    acq_cyc = 0;
    full_seen = 0;
    for (int t = 0; t < ntrig; t++) begin
      repeat (gap) begin
        @(negedge clk);
        trigger = 1'b0;
        @(posedge clk) acq_cyc++;
      end
      @(negedge clk);
      if (chip_sat) full_seen = 1;
      trigger = 1'b1;
      hit = {$urandom, $urandom, $urandom, $urandom};
      if (expected.size() < MEM_FRAMES) expected.push_back({chip_id, BCID_W'(acq_cyc), hit});
      check(chip_sat == (expected.size() > MEM_FRAMES - 1 && t >= MEM_FRAMES),
            "ChipSat only when the memory is full");
      @(posedge clk) acq_cyc++;
    end
    @(negedge clk) trigger = 1'b0;
    @(negedge clk);
    if (ntrig >= MEM_FRAMES) check(chip_sat == 1'b1, "ChipSat while the memory is full");
    check(frame_count == MEM_ADDR_W'(expected.size()), "frame count");
    start_acq = 1'b0;
    @(negedge clk);
    check(chip_sat == 1'b1, "ChipSat raised at the end of the acquisition");
    // conversion
    repeat (5) @(negedge clk);
    conv_busy = 1'b1;
    repeat (20) @(negedge clk);
    check(chip_sat == 1'b1, "ChipSat held during the conversion");
    conv_busy = 1'b0;
    repeat (4) @(negedge clk);
    check(chip_sat == 1'b0, "ChipSat released after the conversion");
  endtask

  task automatic readout();
    int n_exp;
    n_exp = expected.size();
    ntx = 0; nero = 0; nbits = 0;
    repeat (3) @(negedge clk);
    start_ro = 1'b1;
    @(negedge clk) start_ro = 1'b0;
    while (!end_readout) begin
      check(transmit_on || nbits == n_exp * FRAME_W, "no gap in transmission");
      if (transmit_on) begin
        got = {got[FRAME_W-2:0], data};
        ntx++; nbits++;
        if (nbits % FRAME_W == 0) begin
          check(expected.size() > 0, "no frame beyond the stored ones");
          if (expected.size() > 0) begin
            check(got == expected[0],
                  $sformatf("frame %0d: got %h expected %h", nbits / FRAME_W - 1, got, expected[0]));
            void'(expected.pop_front());
          end
        end
      end
      @(negedge clk);
    end
    check(ntx == n_exp * FRAME_W,
          $sformatf("readout takes %0d clocks, expected %0d", ntx, n_exp * FRAME_W));
    check(expected.size() == 0, "all stored frames read");
    while (end_readout) begin
      nero++;
      check(!transmit_on, "silent during EndReadOut");
      @(negedge clk);
    end
    check(nero == 8, $sformatf("EndReadOut lasts %0d clocks", nero));
    check(frame_count == '0, "memory empty after the readout");
  endtask

  initial begin
    #30ns rstb = 1'b0;
    #300ns rstb = 1'b1;
    check(chip_sat == 1'b0 && transmit_on == 1'b0 && end_readout == 1'b0, "idle after reset");
    // run 0
    acquire(9, 3);
    readout();
    // run 1: memory full
    chip_id = 8'hC3;
    acquire(140, 0);
    check(full_seen, "ChipSat seen during the acquisition");
    readout();
    // run 2: empty
    acquire(0, 0);
    readout();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
