// tb_sc_shift_reg: checks the slow-control shift register.
// Checks the power-up default of the example configuration "011" (first
// flip-flop reset, the other two set), a wider register with another
// default, bit-by-bit shifting against a software model, and that the
// chain output changes only on the falling clock edge.
module tb_sc_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rstb = 1'b1, din = 1'b0;
  logic [2:0] q3;  logic l3, d3;
  logic [6:0] q7;  logic l7, d7;
  logic [6:0] model;

  sc_shift_reg u3 (.clk(clk), .rstb(rstb), .din(din), .q(q3), .last_bit(l3), .dout(d3));
  sc_shift_reg #(.W(7), .DEFAULT(7'b1011001)) u7
    (.clk(clk), .rstb(rstb), .din(din), .q(q7), .last_bit(l7), .dout(d7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000ns;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ns rstb = 1'b0;
    #15ns;
    check(q3 == 3'b110, "example default: flip-flop 0 reset, 1 and 2 set");
    check(q7 == 7'b1011001, "7-bit default");
    check(d3 == 1'b0 && d7 == 1'b0, "output flip-flop reset");
    rstb = 1'b1;
    model = 7'b1011001;
    #10ns;
    for (int i = 0; i < 40; i++) begin
      din = 1'($urandom);
      #10ns clk = 1'b1;             // rising edge: shift
      model = {model[5:0], din};
      #1ns;
      check(q7 == model, $sformatf("shift %0d: q=%b model=%b", i, q7, model));
      check(l7 == model[6], "last bit");
      check(d7 == (i == 0 ? 1'b0 : u7_prev_last), "dout holds until the falling edge");
      #9ns clk = 1'b0;               // falling edge: output flip-flop
      #1ns;
      check(d7 == model[6], "dout follows last bit after the falling edge");
      check(d3 == q3[2], "3-bit dout");
      u7_prev_last = model[6];
    end
    // asynchronous reset restores the default at any time
    rstb = 1'b0;
    #1ns;
    check(q7 == 7'b1011001 && q3 == 3'b110 && d7 == 1'b0, "asynchronous reset to default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic u7_prev_last;
endmodule
