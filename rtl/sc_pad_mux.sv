// sc_pad_mux: one set of pads shared by the slow-control (SC) and the probe
// shift registers.
//
// The two registers used to need eight pads (data in, data out, clock and
// reset each).  Here they share four plus a Select pad.  Select low (its
// pad is pulled down, so this is also the default) routes the pads to the
// probe register, so that nothing on the pads can disturb the slow control
// by accident; Select high routes them to the SC register.  The register
// that is not selected sees 0 on its data and clock inputs, as the
// pull-down resistors on the unselected demultiplexer outputs would give,
// so it holds its content.  The data output pad shows the selected
// register's output.  The reset pad reaches both registers: holding the
// unselected one in reset would wipe the configuration.
//
// Purely combinational.  From the original description: the Select pad,
// its probe default and the pull-downs.  Own choices: reset not switched,
// clock switched like data.
module sc_pad_mux (
  input  logic pad_sel,     // 1: slow control, 0: probe
  input  logic pad_din,
  input  logic pad_clk,
  input  logic pad_rstb,
  output logic pad_dout,
  // slow-control register side
  output logic sc_din,
  output logic sc_clk,
  output logic sc_rstb,
  input  logic sc_dout,
  // probe register side
  output logic pr_din,
  output logic pr_clk,
  output logic pr_rstb,
  input  logic pr_dout
);

  assign sc_din   = pad_sel  & pad_din;
  assign sc_clk   = pad_sel  & pad_clk;
  assign pr_din   = ~pad_sel & pad_din;
  assign pr_clk   = ~pad_sel & pad_clk;
  assign sc_rstb  = pad_rstb;
  assign pr_rstb  = pad_rstb;
  assign pad_dout = pad_sel ? sc_dout : pr_dout;

endmodule
