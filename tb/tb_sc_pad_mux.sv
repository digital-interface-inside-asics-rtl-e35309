// tb_sc_pad_mux: exhaustive check of the shared slow-control / probe pads.
// For every input combination: Select low routes data and clock to the
// probe register and leaves the SC register's inputs at 0; Select high does
// the opposite; the reset pad reaches both; the output pad shows the
// selected register.
module tb_sc_pad_mux;
  int checks = 0, failures = 0;
  logic sel, din, clk, rstb, sc_dout, pr_dout;
  logic pad_dout, sc_din, sc_clk, sc_rstb, pr_din, pr_clk, pr_rstb;

  sc_pad_mux dut (
    .pad_sel(sel), .pad_din(din), .pad_clk(clk), .pad_rstb(rstb), .pad_dout(pad_dout),
    .sc_din(sc_din), .sc_clk(sc_clk), .sc_rstb(sc_rstb), .sc_dout(sc_dout),
    .pr_din(pr_din), .pr_clk(pr_clk), .pr_rstb(pr_rstb), .pr_dout(pr_dout)
  );

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {sel, din, clk, rstb, sc_dout, pr_dout} = 6'(v);
      #1ns;
      checks++;
      if (sel) begin
        if (!(sc_din == din && sc_clk == clk && pr_din == 1'b0 && pr_clk == 1'b0
              && pad_dout == sc_dout)) begin
          failures++; $display("FAIL: select=1 vector %0d", v);
        end
      end else begin
        if (!(pr_din == din && pr_clk == clk && sc_din == 1'b0 && sc_clk == 1'b0
              && pad_dout == pr_dout)) begin
          failures++; $display("FAIL: select=0 vector %0d", v);
        end
      end
      checks++;
      if (!(sc_rstb == rstb && pr_rstb == rstb)) begin
        failures++; $display("FAIL: reset vector %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
