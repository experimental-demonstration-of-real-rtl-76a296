// Real-time FDM QPSK receiver: digital part, from converter samples to the
// buffered symbol stream.
//
// Data path (one FDMA channel, 1 Gb/s QPSK at 500 MBd, already mixed to
// baseband):
//   deser         1 GS/s I and Q samples -> words of four samples at 250 MHz
//   iq_comp       blind correction of the I/Q gain and phase imbalance
//   lms_equalizer two parallel eleven-tap T/2 LMS equalizers (plus a third
//                 filter) with center-tap tracking for the sampling offset,
//                 QPSK decisions: 1, 2 or 3 symbols per cycle
//   symbol_fifo   packs the decisions into 4-symbol words and buffers them
//                 towards the recovered clock rd_clk
//   fifo_pll_ctrl turns the FIFO filling into the PLL frequency control
// The PLL itself (a clocking primitive of the FPGA) is outside: it takes
// pll_ctrl and returns rd_clk, whose rate then follows the transmitter's
// symbol clock (one word of four symbols per rd_clk, 125 MHz nominal).
// Status outputs: the per-cycle symbol count and shift events of the
// equalizer, its peak-energy tap, the FIFO filling and overflow count, and
// the control-loop integrator (clk_offset), which settles at the relative
// offset between transmitter and receiver clocks in units of 2^-20.
//
// Clocks: clk_smp is the 1 GHz sample clock; clk is clk_smp divided by four
// with its rising edge on the deserializer's phase 0 (rst_n released in step
// with clk); rd_clk is the PLL output, asynchronous to both, with its own
// reset rd_rst_n. The deserializer word is captured on clk, so the equalizer
// input is two clk cycles behind the last sample of a word, and decisions
// reach the FIFO four cycles after the word enters the IQ compensator.
// The chain of blocks, the rates and the equalizer structure follow the
// receiver description; widths, adaptation gains, the FIFO depth and the
// control law are this design's choices (see each block).
module fdm_rx_top
  import fdm_rx_pkg::*;
#(
  parameter int unsigned W          = ADC_BITS,
  parameter int unsigned PAR        = SAMPLES_PER_CYCLE,
  parameter int unsigned NTAPS      = EQ_TAPS,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned CTRL_W     = 20
) (
  input  logic                        clk_smp,
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [W-1:0]         adc_i,
  input  logic signed [W-1:0]         adc_q,
  // recovered clock domain
  input  logic                        rd_clk,
  input  logic                        rd_rst_n,
  output logic                        out_valid,
  output logic [7:0]                  out_word,     // four QPSK symbols, symbol 0 in [1:0]
  output logic                        underflow,
  // PLL control and status (clk domain)
  output logic signed [CTRL_W-1:0]    pll_ctrl,
  output logic [$clog2(FIFO_DEPTH):0] fifo_fill,
  output logic [15:0]                 overflow_cnt,
  output logic                        sym_valid,
  output logic [1:0]                  sym_cnt,
  output logic                        shift_left_evt,
  output logic                        shift_right_evt,
  output logic [$clog2(NTAPS)-1:0]    peak_tap,      // equalizer tap of maximum energy
  output logic signed [CTRL_W-1:0]    clk_offset     // PLL integrator: TX/RX clock offset, 2^-20 units
);

  // ------------------------------------------------------------ deserializer
  logic signed [W-1:0] dw_i [PAR];
  logic signed [W-1:0] dw_q [PAR];
  logic                dw_stb;

  deser #(.W(W), .RATIO(PAR)) u_deser (
    .clk_smp(clk_smp), .rst_n(rst_n), .in_i(adc_i), .in_q(adc_q),
    .word_i(dw_i), .word_q(dw_q), .word_stb(dw_stb)
  );

  // capture into the 250 MHz domain
  logic signed [W-1:0] cw_i [PAR];
  logic signed [W-1:0] cw_q [PAR];
  logic                cw_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_valid <= 1'b0;
      for (int k = 0; k < PAR; k++) begin
        cw_i[k] <= '0;
        cw_q[k] <= '0;
      end
    end else begin
      cw_valid <= 1'b1;
      cw_i     <= dw_i;
      cw_q     <= dw_q;
    end
  end

  // ------------------------------------------------------------ IQ compensation
  logic                iq_valid;
  logic signed [W-1:0] iq_i [PAR];
  logic signed [W-1:0] iq_q [PAR];
  logic signed [15:0]  iq_p, iq_g;

  iq_comp #(.W(W), .PAR(PAR)) u_iq (
    .clk(clk), .rst_n(rst_n), .in_valid(cw_valid), .in_i(cw_i), .in_q(cw_q),
    .out_valid(iq_valid), .out_i(iq_i), .out_q(iq_q), .coef_p(iq_p), .coef_g(iq_g)
  );

  // ------------------------------------------------------------ equalizer
  qpsk_sym_t           eq_sym [3];
  logic signed [13:0]  eq_re [3];
  logic signed [13:0]  eq_im [3];
  logic signed [17:0]  eq_c_re [NTAPS];
  logic signed [17:0]  eq_c_im [NTAPS];

  lms_equalizer #(.NTAPS(NTAPS), .PAR(PAR), .XW(W)) u_eq (
    .clk(clk), .rst_n(rst_n), .in_valid(iq_valid), .in_re(iq_i), .in_im(iq_q),
    .out_valid(sym_valid), .out_cnt(sym_cnt), .out_sym(eq_sym),
    .out_re(eq_re), .out_im(eq_im),
    .shift_left_evt(shift_left_evt), .shift_right_evt(shift_right_evt),
    .peak_tap(peak_tap), .coef_re(eq_c_re), .coef_im(eq_c_im)
  );

  // ------------------------------------------------------------ FIFO and PLL control
  symbol_fifo #(.DEPTH(FIFO_DEPTH), .SPW(4)) u_fifo (
    .clk(clk), .rst_n(rst_n), .in_valid(sym_valid), .in_cnt(sym_cnt), .in_sym(eq_sym),
    .wr_fill(fifo_fill), .overflow_cnt(overflow_cnt),
    .rd_clk(rd_clk), .rd_rst_n(rd_rst_n),
    .out_valid(out_valid), .out_word(out_word), .underflow(underflow)
  );

  fifo_pll_ctrl #(.DEPTH(FIFO_DEPTH), .CTRL_W(CTRL_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .fill(fifo_fill), .ctrl(pll_ctrl), .integ(clk_offset)
  );

endmodule
