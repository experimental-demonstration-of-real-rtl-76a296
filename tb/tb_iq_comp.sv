// Testbench for iq_comp: QPSK-like samples (+/-150 per quadrature plus
// noise) with a Q branch of gain 0.8 and 15 % leakage of I. Each cycle the
// corrected Q is compared with the correction formula evaluated here from
// the coefficients the block held; after adaptation the coefficients must
// reach p = 0.8 * 0.15 and g = 1 / 0.8 and the output I/Q correlation and
// magnitude ratio must be balanced. Latency of one cycle is checked.
module tb_iq_comp;
  localparam int W = 10, PAR = 4, CW = 16, FRAC = 14;
  localparam real GQ = 0.8, EPS = 0.15;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] in_i [PAR], in_q [PAR], out_i [PAR], out_q [PAR];
  logic out_valid;
  logic signed [CW-1:0] coef_p, coef_g;
  int checks = 0, failures = 0;

  iq_comp #(.W(W), .PAR(PAR)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int satw(input longint v);
    if (v > 511) return 511;
    if (v < -512) return -512;
    return int'(v);
  endfunction

  // expected output of the cycle, from the inputs and coefficients before the edge
  int exp_q [PAR];
  int exp_i [PAR];
  real acc_iq, acc_ii, acc_mi, acc_mq;

  task automatic drive();
    for (int k = 0; k < PAR; k++) begin
      real i0, q0;
      i0 = (($urandom_range(1) != 0) ? 150.0 : -150.0) + ($itor($urandom_range(40)) - 20.0);
      q0 = (($urandom_range(1) != 0) ? 150.0 : -150.0) + ($itor($urandom_range(40)) - 20.0);
      in_i[k] = W'($rtoi(i0));
      in_q[k] = W'($rtoi(GQ * (q0 + EPS * i0)));
    end
  endtask

  initial begin
    for (int k = 0; k < PAR; k++) begin in_i[k] = '0; in_q[k] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    acc_iq = 0; acc_ii = 0; acc_mi = 0; acc_mq = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      drive();
      #0;
      for (int k = 0; k < PAR; k++) begin
        longint q1;
        q1 = longint'(satw(longint'(in_q[k]) - ((longint'(coef_p) * in_i[k]) >>> FRAC)));
        exp_q[k] = satw((longint'(coef_g) * q1) >>> FRAC);
        exp_i[k] = in_i[k];
      end
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid low at %0d", t); end
      for (int k = 0; k < PAR; k++) begin
        if (int'(out_q[k]) != exp_q[k] || int'(out_i[k]) != exp_i[k]) begin
          failures++;
          $display("FAIL t=%0d k=%0d q got %0d exp %0d", t, k, out_q[k], exp_q[k]);
        end
        if (t >= 4000) begin
          acc_iq += real'(out_i[k]) * real'(out_q[k]);
          acc_ii += real'(out_i[k]) * real'(out_i[k]);
          acc_mi += (out_i[k] < 0) ? -real'(out_i[k]) : real'(out_i[k]);
          acc_mq += (out_q[k] < 0) ? -real'(out_q[k]) : real'(out_q[k]);
        end
      end
    end
    begin
      real p, g, rho, ratio;
      p = real'(coef_p) / 16384.0;
      g = real'(coef_g) / 16384.0;
      rho = acc_iq / acc_ii;
      ratio = acc_mq / acc_mi;
      $display("p=%f (target %f) g=%f (target %f) corr=%f ratio=%f", p, GQ * EPS, g, 1.0 / GQ, rho, ratio);
      checks++;
      if (p < GQ * EPS - 0.01 || p > GQ * EPS + 0.01) begin failures++; $display("FAIL phase coefficient"); end
      checks++;
      if (g < 1.0 / GQ - 0.03 || g > 1.0 / GQ + 0.03) begin failures++; $display("FAIL gain coefficient"); end
      checks++;
      if (rho > 0.02 || rho < -0.02) begin failures++; $display("FAIL residual correlation"); end
      checks++;
      if (ratio < 0.98 || ratio > 1.02) begin failures++; $display("FAIL magnitude ratio"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
