// Testbench for fse_fir: random complex windows and coefficients (full range
// included) against a complex dot product computed here in 64-bit integers.
module tb_fse_fir;
  localparam int NTAPS = 11, XW = 10, CW = 18;
  localparam int AW = XW + CW + 1 + $clog2(NTAPS);

  logic signed [XW-1:0] w_re [NTAPS], w_im [NTAPS];
  logic signed [CW-1:0] c_re [NTAPS], c_im [NTAPS];
  logic signed [AW-1:0] acc_re, acc_im;
  int checks = 0, failures = 0;

  fse_fir #(.NTAPS(NTAPS), .XW(XW), .CW(CW)) dut (.*);

  function automatic int rnd(input int bits, input bit extreme);
    int lim = 1 << (bits - 1);
    if (extreme) return ($urandom_range(1) != 0) ? lim - 1 : -lim;
    return $signed($urandom_range(2 * lim - 1)) - lim;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint er, ei;
      bit ext;
      er = 0;
      ei = 0;
      ext = (t < 20);
      for (int n = 0; n < NTAPS; n++) begin
        w_re[n] = XW'(rnd(XW, ext));
        w_im[n] = XW'(rnd(XW, ext));
        c_re[n] = CW'(rnd(CW, ext));
        c_im[n] = CW'(rnd(CW, ext));
      end
      #1;
      for (int n = 0; n < NTAPS; n++) begin
        er += longint'(c_re[n]) * w_re[n] - longint'(c_im[n]) * w_im[n];
        ei += longint'(c_re[n]) * w_im[n] + longint'(c_im[n]) * w_re[n];
      end
      checks++;
      if (longint'(acc_re) != er || longint'(acc_im) != ei) begin
        failures++;
        $display("FAIL t=%0d got (%0d,%0d) exp (%0d,%0d)", t, acc_re, acc_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
