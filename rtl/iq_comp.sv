// Blind adaptive I/Q imbalance compensator, four samples per cycle.
//
// The optical and RF front end leaves the Q branch with a gain error and a
// leakage of I (phase error). Each cycle the block corrects the PAR samples of
// a word with two shared coefficients:
//     q1  = q - (p * i) >> FRAC          (removes the I leakage)
//     q2  = (g * q1) >> FRAC             (equalizes the Q gain)
// and passes I unchanged. The coefficients adapt once per cycle from the whole
// word, without training data: p moves with sum(i * q1), driving the I/Q
// correlation to zero, and g moves with sum(|i| - |q2|), making the mean
// magnitudes of I and Q equal.
//
// Interface: a word of PAR samples per stream with in_valid; the corrected
// word appears one cycle later with out_valid. Outputs saturate to W bits.
// p starts at 0 and g at 1.0. That the block corrects the front-end imbalance
// follows the receiver description; this correlation/magnitude algorithm, the
// coefficient format and the step sizes are this design's own choices.
module iq_comp #(
  parameter int unsigned W      = 10,  // sample width
  parameter int unsigned PAR    = 4,   // samples per cycle
  parameter int unsigned CW     = 16,  // coefficient width
  parameter int unsigned FRAC   = 14,  // coefficient fraction bits
  parameter int unsigned MU_P   = 10,  // phase step: right shift of the correlation sum
  parameter int unsigned MU_G   = 3    // gain step: right shift of the magnitude difference
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_i  [PAR],
  input  logic signed [W-1:0]  in_q  [PAR],
  output logic                 out_valid,
  output logic signed [W-1:0]  out_i [PAR],
  output logic signed [W-1:0]  out_q [PAR],
  output logic signed [CW-1:0] coef_p,
  output logic signed [CW-1:0] coef_g
);

  localparam int PW = W + CW;                 // product width
  localparam int SW = 2 * W + $clog2(PAR) + 1; // accumulated correlation width

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] hi, lo;
    hi = PW'((1 << (W - 1)) - 1);
    lo = -PW'(1 << (W - 1));
    if (v > hi)      return hi[W-1:0];
    else if (v < lo) return lo[W-1:0];
    else             return v[W-1:0];
  endfunction

  function automatic logic signed [CW-1:0] sat_c(input logic signed [CW+1:0] v);
    logic signed [CW+1:0] hi, lo;
    hi = (CW+2)'((1 << (CW - 1)) - 1);
    lo = -(CW+2)'(1 << (CW - 1));
    if (v > hi)      return hi[CW-1:0];
    else if (v < lo) return lo[CW-1:0];
    else             return v[CW-1:0];
  endfunction

  logic signed [W-1:0]  q1 [PAR];
  logic signed [W-1:0]  q2 [PAR];
  logic signed [SW-1:0] corr_sum;
  logic signed [SW-1:0] mag_sum;

  always_comb begin
    corr_sum = '0;
    mag_sum  = '0;
    for (int k = 0; k < PAR; k++) begin
      logic signed [PW-1:0] t1, t2;
      t1    = PW'(in_q[k]) - ((PW'(coef_p) * PW'(in_i[k])) >>> FRAC);
      q1[k] = sat(t1);
      t2    = (PW'(coef_g) * PW'(q1[k])) >>> FRAC;
      q2[k] = sat(t2);
      corr_sum = corr_sum + SW'(in_i[k]) * SW'(q1[k]);
      mag_sum  = mag_sum + (in_i[k] < 0 ? -SW'(in_i[k]) : SW'(in_i[k]))
                         - (q2[k]   < 0 ? -SW'(q2[k])   : SW'(q2[k]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef_p    <= '0;
      coef_g    <= CW'(1 << FRAC);
      out_valid <= 1'b0;
      for (int k = 0; k < PAR; k++) begin
        out_i[k] <= '0;
        out_q[k] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < PAR; k++) begin
          out_i[k] <= in_i[k];
          out_q[k] <= q2[k];
        end
        coef_p <= sat_c((CW+2)'(coef_p) + (CW+2)'(corr_sum >>> MU_P));
        coef_g <= sat_c((CW+2)'(coef_g) + (CW+2)'(mag_sum >>> MU_G));
      end
    end
  end

endmodule
