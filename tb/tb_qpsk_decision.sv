// Testbench for qpsk_decision: random equalized samples, including zero and
// the extremes, against the quadrant rule (bit 0 = I negative, bit 1 = Q
// negative, reference point +/-A_REF per quadrature).
module tb_qpsk_decision;
  import fdm_rx_pkg::*;
  localparam int YW = 14;
  localparam int A  = 128;

  logic signed [YW-1:0] y_re, y_im, d_re, d_im;
  qpsk_sym_t sym;
  int checks = 0, failures = 0;

  qpsk_decision #(.YW(YW), .A_REF(A)) dut (.*);

  task automatic check_one(input int re, input int im);
    int exp_re, exp_im;
    logic [1:0] exp_sym;
    y_re = YW'(re);
    y_im = YW'(im);
    #1;
    exp_re  = (re < 0) ? -A : A;
    exp_im  = (im < 0) ? -A : A;
    exp_sym = {im < 0, re < 0};
    checks++;
    if (sym !== exp_sym || int'(d_re) != exp_re || int'(d_im) != exp_im) begin
      failures++;
      $display("FAIL y=(%0d,%0d) sym=%b d=(%0d,%0d)", re, im, sym, d_re, d_im);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0, 0);
    check_one(-1, 1);
    check_one(8191, -8192);
    check_one(-8192, 8191);
    for (int k = 0; k < 500; k++)
      check_one($signed($urandom_range(16383)) - 8192, $signed($urandom_range(16383)) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
