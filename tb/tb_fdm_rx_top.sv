// End-to-end testbench of the receiver at its default parameters.
//
// A QPSK transmitter and channel (tb_chan_pkg) supply one I/Q sample per
// 1 GHz sample clock: two echoes, a 100 kHz carrier offset at 500 MBd, a Q
// branch with gain 0.9 and 10 % I leakage, noise, and a sampling frequency
// offset of +200 ppm (transmitter faster) for the first half of the run and
// -200 ppm for the second. The FIFO is read by pll_model, steered by the
// receiver's pll_ctrl. Every word read is unpacked into four symbols and
// compared with the transmitted sequence at a fixed lag found once.
// Counted and required at least once: left shifts with an extra symbol (while
// the transmitter is faster), right shifts with a removed symbol (while it is
// slower), 3-symbol and 1-symbol equalizer cycles, and the PLL control
// settling on the right sign in each half. Also required: symbol error rate
// after lock below 1e-3 with the alignment kept across all shifts, no FIFO
// overflow, no underflow once reading has started, and the FIFO
// filling staying within its depth.
`timescale 1ps/1fs
module tb_fdm_rx_top;
  import fdm_rx_pkg::*;
  import tb_chan_pkg::*;
  localparam int NCYC = 32000;  // 250 MHz cycles

  logic clk_smp = 1'b0, clk = 1'b0, rst_n = 1'b0, rd_rst_n = 1'b0;
  logic signed [9:0] adc_i = '0, adc_q = '0;
  logic rd_clk;
  logic out_valid, underflow;
  logic [7:0] out_word;
  logic signed [19:0] pll_ctrl;
  logic [5:0] fifo_fill;
  logic [15:0] overflow_cnt;
  logic sym_valid;
  logic [1:0] sym_cnt;
  logic shift_left_evt, shift_right_evt;
  logic [3:0] peak_tap;
  logic signed [19:0] clk_offset;
  int checks = 0, failures = 0;

  fdm_rx_top dut (.*);

  pll_model #(.NOM_PS(8000.0)) u_pll (.ctrl(pll_ctrl), .clk_out(rd_clk));

  always #500 clk_smp = ~clk_smp;
  always #2000 clk = ~clk;

  initial begin
    #(4000.0 * (NCYC + 4000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qpsk_chan   ch;
  sym_checker chk;
  int n_left [2], n_right [2], n3 = 0, n1 = 0, n_under = 0, n_words = 0, max_fill = 0;
  int cyc = 0;
  real ctrl_sum [2];
  int  ctrl_n [2];
  bit reading = 1'b0;

  // converter samples, one per sample clock, set up on the falling edge
  always @(negedge clk_smp) if (ch != null) begin
    int si, sq;
    ch.next(si, sq);
    adc_i <= 10'(si);
    adc_q <= 10'(sq);
  end

  // write-side monitors
  always @(posedge clk) if (rst_n) begin
    int ph;
    #1;
    ph = (cyc < NCYC / 2) ? 0 : 1;
    if (shift_left_evt) n_left[ph]++;
    if (shift_right_evt) n_right[ph]++;
    if (sym_valid && sym_cnt == 3) n3++;
    if (sym_valid && sym_cnt == 1) n1++;
    if (int'(fifo_fill) > max_fill) max_fill = int'(fifo_fill);
    if ((cyc % (NCYC / 2)) > NCYC / 4) begin
      ctrl_sum[ph] += real'(pll_ctrl);
      ctrl_n[ph]++;
    end
  end

  // read side: unpack and compare
  always @(posedge rd_clk) if (rd_rst_n) begin
    #1;
    if (underflow && reading) n_under++;
    if (out_valid) begin
      reading = 1'b1;
      n_words++;
      for (int k = 0; k < 4; k++) chk.push(out_word[2*k +: 2]);
      if (!chk.locked && n_words > 500) void'(chk.lock(64));
    end
  end

  initial begin
    ch = new();
    ch.cfo    = 2e-4;
    ch.sfo    = 200e-6;
    ch.noise  = 10.0;
    ch.q_gain = 0.9;
    ch.q_leak = 0.1;
    chk = new(ch);
    n_left = '{0, 0};
    n_right = '{0, 0};
    ctrl_sum = '{0.0, 0.0};
    ctrl_n = '{0, 0};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    rd_rst_n = 1'b1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(posedge clk);
      if (cyc == NCYC / 2) ch.sfo = -200e-6;
    end
    $display("shifts: left %0d/%0d right %0d/%0d (first half/second half); 3-symbol cycles %0d, 1-symbol cycles %0d",
             n_left[0], n_left[1], n_right[0], n_right[1], n3, n1);
    $display("pll_ctrl mean: %f (first half), %f (second half), expected about +/-210",
             ctrl_sum[0] / ctrl_n[0], ctrl_sum[1] / ctrl_n[1]);
    $display("words read %0d, underflows %0d, overflows %0d, max fill %0d; locked %0d lag %0d rotation %0d compared %0d errors %0d",
             n_words, n_under, overflow_cnt, max_fill, chk.locked, chk.lag, chk.rot, chk.compared, chk.errors);
    checks++;
    if (n_left[0] < 1 || n_left[1] != 0) begin failures++; $display("FAIL left shifts"); end
    checks++;
    if (n_right[1] < 1 || n_right[0] != 0) begin failures++; $display("FAIL right shifts"); end
    checks++;
    if (n3 < 1 || n1 < 1) begin failures++; $display("FAIL irregular symbol counts never seen"); end
    checks++;
    if (ctrl_sum[0] / ctrl_n[0] < 100.0 || ctrl_sum[1] / ctrl_n[1] > -100.0) begin
      failures++; $display("FAIL PLL control does not follow the clock offset");
    end
    checks++;
    if (overflow_cnt != 0 || n_under != 0 || max_fill > 32) begin failures++; $display("FAIL FIFO overflow/underflow"); end
    checks++;
    if (!chk.locked || chk.compared < 40000) begin failures++; $display("FAIL never locked"); end
    checks++;
    if (chk.errors * 1000 > chk.compared) begin failures++; $display("FAIL symbol error rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
