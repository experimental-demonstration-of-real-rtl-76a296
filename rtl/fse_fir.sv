// One T/2 fractionally spaced complex feed-forward filter (FFF).
//
// Computes one equalized symbol as the complex dot product of NTAPS
// coefficients with NTAPS samples spaced half a symbol apart:
//     acc = sum_n c[n] * w[n]
// where w[0] is the newest sample of the window and w[NTAPS-1] the oldest
// (convolution order). The result keeps full precision; the caller scales
// it by the coefficient fraction bits. Purely combinational. The equalizer
// instantiates it once per tap (NTAPS = 1, a complex multiplier), registers
// the products and sums them in the next stage, so each filter still gives
// one symbol per cycle. Eleven taps at T/2 follow the receiver description; the word widths
// are this design's own.
module fse_fir #(
  parameter int unsigned NTAPS = 11,
  parameter int unsigned XW    = 10,  // sample width
  parameter int unsigned CW    = 18,  // coefficient width
  parameter int unsigned AW    = XW + CW + 1 + $clog2(NTAPS)  // accumulator width
) (
  input  logic signed [XW-1:0] w_re [NTAPS],
  input  logic signed [XW-1:0] w_im [NTAPS],
  input  logic signed [CW-1:0] c_re [NTAPS],
  input  logic signed [CW-1:0] c_im [NTAPS],
  output logic signed [AW-1:0] acc_re,
  output logic signed [AW-1:0] acc_im
);

  always_comb begin
    acc_re = '0;
    acc_im = '0;
    for (int n = 0; n < NTAPS; n++) begin
      acc_re = acc_re + AW'(c_re[n]) * AW'(w_re[n]) - AW'(c_im[n]) * AW'(w_im[n]);
      acc_im = acc_im + AW'(c_re[n]) * AW'(w_im[n]) + AW'(c_im[n]) * AW'(w_re[n]);
    end
  end

endmodule
