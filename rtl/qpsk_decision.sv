// QPSK decision (slicer).
//
// Decides the quadrant of an equalized sample: each quadrature is taken as
// +A_REF when it is zero or positive and -A_REF when negative. It returns the
// hard symbol (bit 0 = I negative, bit 1 = Q negative) and the ideal point,
// which the decision-directed LMS uses as its reference. Combinational.
// That a decision follows the equalizer comes from the receiver description;
// the bit mapping and reference amplitude are this design's choices.
module qpsk_decision
  import fdm_rx_pkg::*;
#(
  parameter int unsigned YW    = 14,
  parameter int unsigned A_REF = 128
) (
  input  logic signed [YW-1:0] y_re,
  input  logic signed [YW-1:0] y_im,
  output qpsk_sym_t            sym,
  output logic signed [YW-1:0] d_re,
  output logic signed [YW-1:0] d_im
);

  always_comb begin
    sym  = {y_im[YW-1], y_re[YW-1]};
    d_re = y_re[YW-1] ? -YW'(A_REF) : YW'(A_REF);
    d_im = y_im[YW-1] ? -YW'(A_REF) : YW'(A_REF);
  end

endmodule
