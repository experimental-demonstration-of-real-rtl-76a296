// Behavioural model of the FPGA clocking PLL that recreates the transmit
// clock (not synthesizable: it uses real-valued delays). The output period is
// NOM_PS scaled by (1 - ctrl * 2^-20), so a positive control word makes the
// clock faster by ctrl ppm-like units of 2^-20. It has no lock time or jitter.
`timescale 1ps/1fs
module pll_model #(
  parameter real NOM_PS = 8000.0,
  parameter int  CTRL_W = 20
) (
  input  logic signed [CTRL_W-1:0] ctrl,
  output logic                     clk_out
);
  initial clk_out = 1'b0;
  always begin
    #((NOM_PS / 2.0) * (1.0 - real'(ctrl) / 1048576.0));
    clk_out = ~clk_out;
  end
endmodule
