// tb_bus_buffer: exhaustive check of the two removable bus buffers in both
// wirings: shared bus line (SPLIT=0) and one line per buffer (SPLIT=1).
// A disconnected buffer must never pull its line; a chip that does not
// transmit pulls nothing.
module tb_bus_buffer;
  int checks = 0, failures = 0;
  logic d, drive;
  logic [1:0] en, line0, line1, exp0, exp1;

  bus_buffer #(.SPLIT(1'b0)) dut_shared (.d(d), .drive(drive), .buf_en(en), .line(line0));
  bus_buffer #(.SPLIT(1'b1)) dut_split  (.d(d), .drive(drive), .buf_en(en), .line(line1));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {d, drive, en} = 4'(v);
      exp1[0] = (en[0] && drive) ? d : 1'b0;
      exp1[1] = (en[1] && drive) ? d : 1'b0;
      exp0    = {1'b0, exp1[0] | exp1[1]};
      #1ns;
      checks += 2;
      if (line0 !== exp0) begin failures++; $display("FAIL: shared line, vector %0d", v); end
      if (line1 !== exp1) begin failures++; $display("FAIL: split lines, vector %0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
