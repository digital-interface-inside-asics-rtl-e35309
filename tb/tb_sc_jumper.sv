// tb_sc_jumper: checks the three positions of a slow-control PCB jumper.
module tb_sc_jumper;
  import roc_pkg::*;
  int checks = 0, failures = 0;
  jumper_t pos;
  logic prev1, prev2, srin, exp;

  sc_jumper dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin
      for (int v = 0; v < 4; v++) begin
        pos = jumper_t'(p);
        {prev1, prev2} = 2'(v);
        exp = (p == 0) ? prev1 : (p == 1) ? prev2 : 1'b0;
        #1ns;
        checks++;
        if (srin !== exp) begin
          failures++; $display("FAIL: position %0d inputs %b", p, 2'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
