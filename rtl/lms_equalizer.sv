// Parallel T/2 adaptive equalizer with LMS update and center-tap tracking.
//
// Samples arrive PAR = 4 per cycle (two QPSK symbols at two samples per
// symbol). A delay line holds the newest NTAPS+4 complex samples, win[0] the
// newest. Three eleven-tap filters share one coefficient set and read the
// delay line at offsets of 4, 2 and 0 samples:
//   F2 (offset 2) and F0 (offset 0) compute the two symbols of every cycle;
//   F4 (offset 4) is the third filter, whose symbol is used only in the cycle
//   after a left shift.
//
// LMS: the error of each decision, e = decision - y, updates the shared
// coefficients every cycle, c[n] += (e2*conj(w[2+n]) + e0*conj(w[n])) >> MU_SHIFT
// - c[n] >> LEAK_SHIFT (decision directed, so no training data). The small
// leakage keeps the coefficients out of the directions the band-limited input
// does not excite; without it energy collects in side lobes two taps from the
// main one and the center-tap tracker shifts back and forth. The update uses
// the filter results
// of two cycles before (a two-cycle delayed LMS), which keeps the filter and
// the update in separate pipeline stages.
//
// Pipeline, one register per stage, all enabled by in_valid:
//   1. each tap's complex product (a one-tap fse_fir per tap and filter),
//      registered like the output register of an FPGA multiplier block;
//   2. sum of the eleven products, scaled and saturated to YW bits;
//   3. decisions, errors and gradient; coefficient update and output register.
//
// Center-tap tracking: center_tap_tracker watches the coefficient energies.
// When the peak has drifted two taps (one symbol) right of the center the
// coefficients move two taps towards index 0 (left shift). The filters then
// land one symbol further on in the stream, so in the first cycle computed
// with the shifted coefficients all three
// filters deliver a symbol: 3 outputs. When the peak drifts left the
// coefficients move two taps towards the end (right shift); in that first
// cycle F2 would repeat the last symbol, so only F0's symbol is output: 1 output.
// The LMS update is skipped in the two cycles after the shift (the
// registered gradients belong to the unshifted alignment), and no new shift
// is taken for HOLDOFF cycles.
//
// Interface: in_valid acts as the clock enable of the whole pipeline. Per
// enabled cycle out_cnt (1, 2 or 3) symbols are presented in out_sym[0..cnt-1],
// oldest first, with their soft values out_re/out_im; out_valid marks the
// cycle. Latency: three enabled cycles from the input word to the
// decisions. shift_left_evt/shift_right_evt pulse in the cycle after the
// shift is made; the 3- or 1-symbol output follows three cycles later.
// Coefficients start with 1.0 on the center tap.
//
// From the receiver description: eleven taps at T/2, two parallel filters
// computing consecutive symbols, identical coefficients updated every cycle,
// LMS error, non-data-aided operation, the coefficient shift with an extra
// symbol from a third filter on a left shift and a removed symbol on a right
// shift. This design's own: word widths, step size, the decision-directed
// error, the tap leakage, the two-cycle update delay, the shift threshold and
// the hold-off.
module lms_equalizer
  import fdm_rx_pkg::*;
#(
  parameter int unsigned NTAPS    = 11,
  parameter int unsigned PAR      = 4,
  parameter int unsigned XW       = 10,   // input sample width
  parameter int unsigned CW       = 18,   // coefficient width
  parameter int unsigned C_FRAC   = 14,   // coefficient fraction bits
  parameter int unsigned YW       = 14,   // equalized sample width
  parameter int unsigned A_REF    = 128,  // QPSK decision amplitude per quadrature
  parameter int unsigned MU_SHIFT = 9,    // LMS step: right shift of the gradient
  parameter int unsigned LEAK_SHIFT = 13, // tap leakage: c loses c >> LEAK_SHIFT per update
  parameter int unsigned THR      = 2,    // center-tap tracking threshold in taps
  parameter int unsigned HOLDOFF  = 8     // cycles between two shifts
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [XW-1:0]  in_re  [PAR],   // element 0 oldest
  input  logic signed [XW-1:0]  in_im  [PAR],
  output logic                  out_valid,
  output logic [1:0]            out_cnt,
  output qpsk_sym_t             out_sym [3],
  output logic signed [YW-1:0]  out_re  [3],
  output logic signed [YW-1:0]  out_im  [3],
  output logic                  shift_left_evt,   // pulses in the cycle a left shift is made
  output logic                  shift_right_evt,
  output logic [$clog2(NTAPS)-1:0] peak_tap,
  output logic signed [CW-1:0]  coef_re [NTAPS],
  output logic signed [CW-1:0]  coef_im [NTAPS]
);

  localparam int unsigned CENTER = NTAPS / 2;
  localparam int unsigned WN     = NTAPS + 4;          // delay line length
  localparam int unsigned GN     = NTAPS + 2;          // samples used by F2 and F0
  localparam int unsigned AW     = XW + CW + 1 + $clog2(NTAPS);
  localparam int unsigned GW     = YW + XW + 4;        // gradient width
  localparam int unsigned HW     = $clog2(HOLDOFF + 1);

  // The three-filter arrangement and the 1/2/3 output rule are written for
  // four samples (two symbols) per cycle.
  if (PAR != 4) begin : g_par_check
    $error("lms_equalizer supports PAR = 4 only");
  end

  // ---------------------------------------------------------------- delay line
  logic signed [XW-1:0] win_re [WN];
  logic signed [XW-1:0] win_im [WN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < WN; j++) begin
        win_re[j] <= '0;
        win_im[j] <= '0;
      end
    end else if (in_valid) begin
      for (int j = 0; j < WN; j++) begin
        if (j < PAR) begin
          win_re[j] <= in_re[PAR-1-j];
          win_im[j] <= in_im[PAR-1-j];
        end else begin
          win_re[j] <= win_re[j-PAR];
          win_im[j] <= win_im[j-PAR];
        end
      end
    end
  end

  // ------------------------------------- stage 1: per-tap complex products
  // Every tap of every filter is a one-tap fse_fir; its product is
  // registered, as in a multiplier block with an output register.
  localparam int unsigned PW = XW + CW + 1;            // product width

  logic signed [PW-1:0] prod_re [3][NTAPS];
  logic signed [PW-1:0] prod_im [3][NTAPS];

  // Filter f reads the delay line from offset 2*f: f=0 -> F0, 1 -> F2, 2 -> F4.
  for (genvar f = 0; f < 3; f++) begin : g_fir
    for (genvar n = 0; n < NTAPS; n++) begin : g_tap
      logic signed [PW-1:0] m_re, m_im;
      fse_fir #(.NTAPS(1), .XW(XW), .CW(CW), .AW(PW)) u_mul (
        .w_re('{win_re[2*f + n]}), .w_im('{win_im[2*f + n]}),
        .c_re('{coef_re[n]}),      .c_im('{coef_im[n]}),
        .acc_re(m_re), .acc_im(m_im)
      );
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          prod_re[f][n] <= '0;
          prod_im[f][n] <= '0;
        end else if (in_valid) begin
          prod_re[f][n] <= m_re;
          prod_im[f][n] <= m_im;
        end
      end
    end
  end

  shift_e               mode;          // shift made at the previous enabled edge
  shift_e               p_mode;
  logic                 p_valid;
  logic signed [XW-1:0] p_w_re [GN];
  logic signed [XW-1:0] p_w_im [GN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_mode  <= SH_NONE;
      for (int j = 0; j < GN; j++) begin
        p_w_re[j] <= '0;
        p_w_im[j] <= '0;
      end
    end else if (in_valid) begin
      p_valid <= 1'b1;
      p_mode  <= mode;
      for (int j = 0; j < GN; j++) begin
        p_w_re[j] <= win_re[j];
        p_w_im[j] <= win_im[j];
      end
    end
  end

  // ------------------------------------------ stage 2: sums of the products
  logic signed [AW-1:0] acc_re [3];
  logic signed [AW-1:0] acc_im [3];

  always_comb begin
    for (int f = 0; f < 3; f++) begin
      acc_re[f] = '0;
      acc_im[f] = '0;
      for (int n = 0; n < NTAPS; n++) begin
        acc_re[f] = acc_re[f] + AW'(prod_re[f][n]);
        acc_im[f] = acc_im[f] + AW'(prod_im[f][n]);
      end
    end
  end

  function automatic logic signed [YW-1:0] scale_sat(input logic signed [AW-1:0] a);
    logic signed [AW-1:0] v, hi, lo;
    v  = a >>> C_FRAC;
    hi = AW'((1 << (YW - 1)) - 1);
    lo = -AW'(1 << (YW - 1));
    if (v > hi)      return hi[YW-1:0];
    else if (v < lo) return lo[YW-1:0];
    else             return v[YW-1:0];
  endfunction

  shift_e               s1_mode;
  logic                 s1_valid;
  logic signed [YW-1:0] s1_re [3];
  logic signed [YW-1:0] s1_im [3];
  logic signed [XW-1:0] s1_w_re [GN];
  logic signed [XW-1:0] s1_w_im [GN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_mode  <= SH_NONE;
      for (int f = 0; f < 3; f++) begin
        s1_re[f] <= '0;
        s1_im[f] <= '0;
      end
      for (int j = 0; j < GN; j++) begin
        s1_w_re[j] <= '0;
        s1_w_im[j] <= '0;
      end
    end else if (in_valid) begin
      s1_valid <= p_valid;
      s1_mode  <= p_mode;
      for (int f = 0; f < 3; f++) begin
        s1_re[f] <= scale_sat(acc_re[f]);
        s1_im[f] <= scale_sat(acc_im[f]);
      end
      for (int j = 0; j < GN; j++) begin
        s1_w_re[j] <= p_w_re[j];
        s1_w_im[j] <= p_w_im[j];
      end
    end
  end

  // ------------------------------------- stage 3: decisions, errors, gradient
  qpsk_sym_t            dsym [3];
  logic signed [YW-1:0] d_re [3];
  logic signed [YW-1:0] d_im [3];

  for (genvar f = 0; f < 3; f++) begin : g_dec
    qpsk_decision #(.YW(YW), .A_REF(A_REF)) u_dec (
      .y_re(s1_re[f]), .y_im(s1_im[f]),
      .sym(dsym[f]), .d_re(d_re[f]), .d_im(d_im[f])
    );
  end

  logic signed [GW-1:0] grad_re [NTAPS];
  logic signed [GW-1:0] grad_im [NTAPS];

  always_comb begin
    for (int n = 0; n < NTAPS; n++) begin
      grad_re[n] = '0;
      grad_im[n] = '0;
      // F0 (f = 0) and F2 (f = 1) carry the symbols of every cycle
      for (int f = 0; f < 2; f++) begin
        logic signed [GW-1:0] er, ei, wr, wi;
        er = GW'(d_re[f]) - GW'(s1_re[f]);
        ei = GW'(d_im[f]) - GW'(s1_im[f]);
        wr = GW'(s1_w_re[2*f + n]);
        wi = GW'(s1_w_im[2*f + n]);
        grad_re[n] = grad_re[n] + er * wr + ei * wi;
        grad_im[n] = grad_im[n] + ei * wr - er * wi;
      end
    end
  end

  function automatic logic signed [CW-1:0] upd(input logic signed [CW-1:0] c,
                                               input logic signed [GW-1:0] g);
    logic signed [GW:0] step, sum, hi, lo;
    step = ((GW+1)'(g) + (GW+1)'(1 << (MU_SHIFT - 1))) >>> MU_SHIFT;  // rounded
    sum  = (GW+1)'(c) + step - ((GW+1)'(c) >>> LEAK_SHIFT);  // leakage
    hi   = (GW+1)'((1 << (CW - 1)) - 1);
    lo   = -(GW+1)'(1 << (CW - 1));
    if (sum > hi)      return hi[CW-1:0];
    else if (sum < lo) return lo[CW-1:0];
    else               return sum[CW-1:0];
  endfunction

  // ------------------------------------------- coefficients and tracking
  shift_e         trk_cmd;
  logic [1:0]     skip;                // updates still to skip after a shift
  logic [HW-1:0]  hold;

  center_tap_tracker #(.NTAPS(NTAPS), .CW(CW), .CENTER(CENTER), .THR(THR)) u_trk (
    .c_re(coef_re), .c_im(coef_im), .peak(peak_tap), .cmd(trk_cmd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NTAPS; n++) begin
        coef_re[n] <= (n == CENTER) ? CW'(1 << C_FRAC) : '0;
        coef_im[n] <= '0;
      end
      mode            <= SH_NONE;
      skip            <= '0;
      hold            <= '0;
      shift_left_evt  <= 1'b0;
      shift_right_evt <= 1'b0;
    end else begin
      shift_left_evt  <= 1'b0;
      shift_right_evt <= 1'b0;
      if (in_valid) begin
        mode <= SH_NONE;
        if (hold != '0)
          hold <= hold - 1'b1;
        if (trk_cmd != SH_NONE && hold == '0) begin
          for (int n = 0; n < NTAPS; n++) begin
            if (trk_cmd == SH_LEFT) begin
              coef_re[n] <= (n + 2 < NTAPS) ? coef_re[(n + 2) % NTAPS] : '0;
              coef_im[n] <= (n + 2 < NTAPS) ? coef_im[(n + 2) % NTAPS] : '0;
            end else begin
              coef_re[n] <= (n >= 2) ? coef_re[(n + NTAPS - 2) % NTAPS] : '0;
              coef_im[n] <= (n >= 2) ? coef_im[(n + NTAPS - 2) % NTAPS] : '0;
            end
          end
          mode            <= trk_cmd;
          skip            <= 2'd2;
          hold            <= HW'(HOLDOFF);
          shift_left_evt  <= (trk_cmd == SH_LEFT);
          shift_right_evt <= (trk_cmd == SH_RIGHT);
        end else if (skip != '0) begin
          skip <= skip - 1'b1;
        end else if (s1_valid) begin
          for (int n = 0; n < NTAPS; n++) begin
            coef_re[n] <= upd(coef_re[n], grad_re[n]);
            coef_im[n] <= upd(coef_im[n], grad_im[n]);
          end
        end
      end
    end
  end

  // ------------------------------------------------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cnt   <= '0;
      for (int k = 0; k < 3; k++) begin
        out_sym[k] <= '0;
        out_re[k]  <= '0;
        out_im[k]  <= '0;
      end
    end else begin
      out_valid <= in_valid && s1_valid;
      if (in_valid && s1_valid) begin
        unique case (s1_mode)
          SH_LEFT: begin   // F4, F2, F0: one extra symbol
            out_cnt <= 2'd3;
            for (int k = 0; k < 3; k++) begin
              out_sym[k] <= dsym[2-k];
              out_re[k]  <= s1_re[2-k];
              out_im[k]  <= s1_im[2-k];
            end
          end
          SH_RIGHT: begin  // F2 repeats the previous symbol: F0 only
            out_cnt    <= 2'd1;
            out_sym[0] <= dsym[0];
            out_re[0]  <= s1_re[0];
            out_im[0]  <= s1_im[0];
            for (int k = 1; k < 3; k++) begin
              out_sym[k] <= '0;
              out_re[k]  <= '0;
              out_im[k]  <= '0;
            end
          end
          default: begin   // F2, F0
            out_cnt    <= 2'd2;
            for (int k = 0; k < 2; k++) begin
              out_sym[k] <= dsym[1-k];
              out_re[k]  <= s1_re[1-k];
              out_im[k]  <= s1_im[1-k];
            end
            out_sym[2] <= '0;
            out_re[2]  <= '0;
            out_im[2]  <= '0;
          end
        endcase
      end
    end
  end

  // 1, 2 or 3 symbols per output cycle; a shift never directly follows another
  a_out_cnt: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> out_cnt inside {2'd1, 2'd2, 2'd3});
  a_shift_holdoff: assert property (@(posedge clk) disable iff (!rst_n)
    (shift_left_evt || shift_right_evt) |=> !(shift_left_evt || shift_right_evt));

endmodule
