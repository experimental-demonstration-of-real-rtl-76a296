// Testbench for lms_equalizer: QPSK through a channel with two echoes, a
// carrier frequency offset of 100 kHz at 500 MBd (2e-4 cycles per symbol),
// noise (+/-10 LSB uniform on a 110 LSB signal), and a sampling frequency
// offset of +200 ppm (transmitter faster) for the first half of the run and
// -200 ppm for the second. Four samples per cycle are fed.
// Checks:
//   - out_cnt is 2 in normal cycles, 3 three cycles after every left shift
//     event and 1 three cycles after every right shift event;
//   - left shifts happen while the transmitter is faster (sfo > 0), right
//     shifts while it is slower, at least two of each;
//   - once the decisions lock onto the transmitted sequence they stay at the
//     same lag for the rest of the run with a symbol error rate below 1e-3
//     (none are expected at this noise level); a lost or repeated symbol
//     would break the alignment and make about 3/4 of the later symbols wrong;
//   - holding in_valid low freezes the equalizer.
module tb_lms_equalizer;
  import fdm_rx_pkg::*;
  import tb_chan_pkg::*;
  localparam int NTAPS = 11, PAR = 4, XW = 10, CW = 18, YW = 14;
  localparam int NCYC = 12000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [XW-1:0] in_re [PAR], in_im [PAR];
  logic out_valid;
  logic [1:0] out_cnt;
  qpsk_sym_t out_sym [3];
  logic signed [YW-1:0] out_re [3], out_im [3];
  logic shift_left_evt, shift_right_evt;
  logic [$clog2(NTAPS)-1:0] peak_tap;
  logic signed [CW-1:0] coef_re [NTAPS], coef_im [NTAPS];
  int checks = 0, failures = 0;

  lms_equalizer #(.NTAPS(NTAPS), .PAR(PAR), .XW(XW)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    #(4 * (NCYC + 2000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qpsk_chan   ch;
  sym_checker chk;
  int n_left = 0, n_right = 0, n_left_wrong = 0, n_right_wrong = 0;
  int n3 = 0, n1 = 0;
  bit prev_l = 0, prev_r = 0, prev2_l = 0, prev2_r = 0, prev3_l = 0, prev3_r = 0;
  int sent = 0, outsyms = 0;

  initial begin
    ch = new();
    ch.cfo = 2e-4;
    ch.sfo = 200e-6;
    ch.noise = 10.0;
    chk = new(ch);
    for (int k = 0; k < PAR; k++) begin in_re[k] = '0; in_im[k] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      if (cyc == NCYC / 2) ch.sfo = -200e-6;
      in_valid = 1'b1;
      for (int k = 0; k < PAR; k++) begin
        int si, sq;
        ch.next(si, sq);
        in_re[k] = XW'(si);
        in_im[k] = XW'(sq);
      end
      sent += PAR;
      @(posedge clk);
      #1;
      // shift events and the output count of the following cycle
      if (out_valid) begin
        int exp_cnt;
        exp_cnt = prev3_l ? 3 : prev3_r ? 1 : 2;
        checks++;
        if (int'(out_cnt) != exp_cnt) begin
          failures++;
          $display("FAIL cycle %0d out_cnt %0d expected %0d", cyc, out_cnt, exp_cnt);
        end
        if (out_cnt == 3) n3++;
        if (out_cnt == 1) n1++;
        for (int k = 0; k < int'(out_cnt); k++) chk.push(out_sym[k]);
        outsyms += int'(out_cnt);
      end
      if (shift_left_evt) begin
        n_left++;
        if (ch.sfo < 0.0) n_left_wrong++;
      end
      if (shift_right_evt) begin
        n_right++;
        if (ch.sfo > 0.0) n_right_wrong++;
      end
      prev3_l = prev2_l;
      prev3_r = prev2_r;
      prev2_l = prev_l;
      prev2_r = prev_r;
      prev_l = shift_left_evt;
      prev_r = shift_right_evt;
      if (cyc > 1000 && !chk.locked) void'(chk.lock(64));
    end
    // clock enable: nothing moves while in_valid is low
    @(negedge clk);
    in_valid = 1'b0;
    begin
      logic signed [CW-1:0] c5;
      c5 = coef_re[5];
      repeat (5) @(posedge clk);
      #1;
      checks++;
      if (out_valid || coef_re[5] != c5) begin
        failures++;
        $display("FAIL equalizer moved while in_valid was low");
      end
    end
    $display("left shifts %0d (wrong direction %0d), right shifts %0d (wrong %0d), 3-symbol cycles %0d, 1-symbol cycles %0d",
             n_left, n_left_wrong, n_right, n_right_wrong, n3, n1);
    $display("locked %0d lag %0d compared %0d errors %0d; %0d samples in, %0d symbols out",
             chk.locked, chk.lag, chk.compared, chk.errors, sent, outsyms);
    checks++;
    if (n_left < 2 || n_right < 2) begin failures++; $display("FAIL too few shifts"); end
    checks++;
    if (n_left_wrong != 0 || n_right_wrong != 0) begin failures++; $display("FAIL shift direction"); end
    checks++;
    if (!chk.locked || chk.compared < 10000) begin failures++; $display("FAIL decisions never locked"); end
    checks++;
    if (chk.errors * 1000 > chk.compared) begin failures++; $display("FAIL %0d symbol errors after lock", chk.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
