// tb_lvds_receiver: checks the receiver model: output low while off, silent
// for the start-up time after the bias is switched on, then following the
// differential input, and low again as soon as the bias is switched off.
module tb_lvds_receiver;
  int checks = 0, failures = 0;
  logic p = 1'b0, start = 1'b0, out;
  int edges;

  lvds_receiver #(.START_NS(500)) dut (.in_p(p), .in_n(~p), .start(start), .out(out));

  always #25ns p = ~p;
  always @(posedge out) edges++;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 2; run++) begin
      #1us;
      checks++; if (edges != 0 || out) begin failures++; $display("FAIL: output while off"); end
      #3ns start = 1'b1;
      #490ns;
      checks++; if (edges != 0) begin failures++; $display("FAIL: output before start-up"); end
      #60ns;
      #1us;
      checks++;
      if (edges < 19 || edges > 21) begin failures++; $display("FAIL: %0d edges in 1 us", edges); end
      start = 1'b0;
      #1ns;
      checks++; if (out) begin failures++; $display("FAIL: output after stop"); end
      edges = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
