// tb_ro_bypass: exhaustive check of the StartReadOut / EndReadOut switches
// against the routing table: normal (SRO in, ERO out), start taken from the
// bypass line, end sent on the bypass line, and self bypass (SRO straight
// to ERO, chip not started).
module tb_ro_bypass;
  int checks = 0, failures = 0;
  logic sro, sro_b, ero_int, self_byp, in_byp, out_byp;
  logic sro_int, ero, ero_b;
  logic exp_sro_int, exp_ero, exp_ero_b;

  ro_bypass dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {sro, sro_b, ero_int, self_byp, in_byp, out_byp} = 6'(v);
      // expected routing, written as a table of cases
      exp_sro_int = 1'b0; exp_ero = 1'b0; exp_ero_b = 1'b0;
      if (self_byp)     exp_ero = sro;
      else begin
        exp_sro_int = in_byp ? sro_b : sro;
        if (out_byp)    exp_ero_b = ero_int;
        else            exp_ero   = ero_int;
      end
      #1ns;
      checks++;
      if ({sro_int, ero, ero_b} !== {exp_sro_int, exp_ero, exp_ero_b}) begin
        failures++;
        $display("FAIL: vector %b got %b expected %b", 6'(v),
                 {sro_int, ero, ero_b}, {exp_sro_int, exp_ero, exp_ero_b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
