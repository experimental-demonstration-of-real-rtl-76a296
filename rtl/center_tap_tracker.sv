// Center-tap tracking decision for the T/2 equalizer.
//
// A sampling frequency offset between transmitter and receiver makes the
// equalizer's main coefficient drift along the delay line. This block
// computes the energy |c[n]|^2 of every coefficient, finds the tap holding the
// most (the lowest index wins a tie) and compares its index with the central
// tap CENTER:
//   index >= CENTER + THR  ->  SH_LEFT  (move coefficients towards index 0)
//   index <= CENTER - THR  ->  SH_RIGHT (move coefficients towards the end)
//   otherwise              ->  SH_NONE
// With THR = 2 (one symbol at T/2) a shift of two taps puts the peak back on
// the center. Combinational; the equalizer registers the command.
// Analysing coefficient magnitudes and shifting them to keep the energy on the
// central tap follows the receiver description; the threshold and the exact
// energy measure are this design's choices.
module center_tap_tracker
  import fdm_rx_pkg::*;
#(
  parameter int unsigned NTAPS  = 11,
  parameter int unsigned CW     = 18,
  parameter int unsigned CENTER = NTAPS / 2,
  parameter int unsigned THR    = 2
) (
  input  logic signed [CW-1:0]        c_re [NTAPS],
  input  logic signed [CW-1:0]        c_im [NTAPS],
  output logic [$clog2(NTAPS)-1:0]    peak,
  output shift_e                      cmd
);

  localparam int EW = 2 * CW + 1;

  logic [EW-1:0] energy [NTAPS];
  logic [EW-1:0] best;

  always_comb begin
    for (int n = 0; n < NTAPS; n++)
      energy[n] = EW'(c_re[n] * c_re[n]) + EW'(c_im[n] * c_im[n]);
    best = energy[0];
    peak = '0;
    for (int n = 1; n < NTAPS; n++) begin
      if (energy[n] > best) begin
        best = energy[n];
        peak = ($clog2(NTAPS))'(n);
      end
    end
    if (32'(peak) >= CENTER + THR)
      cmd = SH_LEFT;
    else if (32'(peak) + THR <= CENTER)
      cmd = SH_RIGHT;
    else
      cmd = SH_NONE;
  end

endmodule
