// Carrier-frequency-offset tolerance of the whole receiver at its default
// parameters (the back-to-back measurement of the receiver: a QPSK signal with
// a numerically added carrier offset, BER counted on the output).
// Run A: 180 kHz offset at 500 MBd (3.6e-4 cycles per symbol), almost no
// noise: after lock no symbol may be wrong. Run B: 100 kHz offset with
// Gaussian noise of 36 LSB rms on a signal of about 100 LSB rms per
// quadrature (about 9 dB SNR at the converter, over the whole 1 GHz band):
// the measured symbol error rate is printed; it must stay below 5e-3, which it
// cannot do if the carrier tracking slips a quarter turn (a slip makes most
// later symbols wrong at the locked rotation). The receiver is reset between
// runs; the sampling clocks are equal and the I/Q branches balanced.
`timescale 1ps/1fs
module tb_cfo_tolerance;
  import fdm_rx_pkg::*;
  import tb_chan_pkg::*;
  localparam int NCYC = 24000;

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
    #(4000.0 * (2 * NCYC + 4000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qpsk_chan   ch;
  sym_checker chk;
  int n_words = 0;

  always @(negedge clk_smp) if (ch != null) begin
    int si, sq;
    ch.next(si, sq);
    adc_i <= 10'(si);
    adc_q <= 10'(sq);
  end

  always @(posedge rd_clk) if (rd_rst_n && chk != null) begin
    #1;
    if (out_valid) begin
      n_words++;
      for (int k = 0; k < 4; k++) chk.push(out_word[2*k +: 2]);
      if (!chk.locked && n_words > 1000) void'(chk.lock(32));
    end
  end

  task automatic run(input real cfo, input real sigma, input real noise, input real max_ser, input string name);
    rst_n = 1'b0;
    rd_rst_n = 1'b0;
    ch = new();
    ch.cfo   = cfo;
    ch.sigma = sigma;
    ch.noise = noise;
    chk = new(ch);
    n_words = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    rd_rst_n = 1'b1;
    repeat (NCYC) @(posedge clk);
    $display("%s: locked %0d rotation %0d compared %0d errors %0d (SER %e)", name, chk.locked, chk.rot,
             chk.compared, chk.errors, real'(chk.errors) / real'(chk.compared + 1));
    checks++;
    if (!chk.locked || chk.compared < 40000) begin failures++; $display("FAIL %s never locked", name); end
    checks++;
    if (real'(chk.errors) > max_ser * real'(chk.compared)) begin failures++; $display("FAIL %s symbol error rate", name); end
  endtask

  initial begin
    run(3.6e-4, 0.0, 1.0, 0.0, "180 kHz, no noise");
    run(2e-4, 36.0, 0.0, 5e-3, "100 kHz, 9 dB SNR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
