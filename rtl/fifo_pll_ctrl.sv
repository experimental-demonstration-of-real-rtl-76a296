// Frequency control of the recovered-clock PLL from the FIFO filling.
//
// The output FIFO is written at the transmitter's symbol rate (as recovered
// by the equalizer) and read by a PLL clock. This proportional-integral loop
// keeps the FIFO half full: with err = fill - DEPTH/2,
//     integ <= integ + err                     (every cycle, saturating)
//     ctrl  <= integ + (err << KP_SHIFT)
// A positive ctrl asks the PLL for a faster read clock. ctrl is a signed
// frequency offset in units of 2^-20 of the nominal read frequency (about
// 1 ppm), so the settled integrator reads the transmitter/receiver clock offset.
// Interface: fill in words from the FIFO's write side; ctrl registered, one
// cycle after the fill it reflects. A PLL steered by the FIFO filling so that
// it images the transmit clock follows the receiver description; the PI form,
// gains and units are this design's own.
module fifo_pll_ctrl #(
  parameter int unsigned DEPTH    = 32,
  parameter int unsigned CTRL_W   = 20,
  parameter int unsigned KP_SHIFT = 11
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(DEPTH):0]      fill,
  output logic signed [CTRL_W-1:0]    ctrl,
  output logic signed [CTRL_W-1:0]    integ
);

  localparam int unsigned FW = $clog2(DEPTH) + 2;

  function automatic logic signed [CTRL_W-1:0] sat(input logic signed [CTRL_W+1:0] v);
    logic signed [CTRL_W+1:0] hi, lo;
    hi = (CTRL_W+2)'((1 << (CTRL_W - 1)) - 1);
    lo = -(CTRL_W+2)'(1 << (CTRL_W - 1));
    if (v > hi)      return hi[CTRL_W-1:0];
    else if (v < lo) return lo[CTRL_W-1:0];
    else             return v[CTRL_W-1:0];
  endfunction

  logic signed [FW-1:0]       err;
  logic signed [CTRL_W-1:0]   integ_nx;

  assign err      = FW'(fill) - FW'(DEPTH / 2);
  assign integ_nx = sat((CTRL_W+2)'(integ) + (CTRL_W+2)'(err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      ctrl  <= '0;
    end else begin
      integ <= integ_nx;
      ctrl  <= sat((CTRL_W+2)'(integ_nx) + ((CTRL_W+2)'(err) <<< KP_SHIFT));
    end
  end

endmodule
