// Testbench for center_tap_tracker: random small coefficients with one
// dominant tap planted at every position (real, imaginary or both parts),
// plus ties; checks the peak index and the shift command
// (LEFT for peak >= 7, RIGHT for peak <= 3, NONE otherwise with 11 taps).
module tb_center_tap_tracker;
  import fdm_rx_pkg::*;
  localparam int NTAPS = 11, CW = 18;

  logic signed [CW-1:0] c_re [NTAPS], c_im [NTAPS];
  logic [$clog2(NTAPS)-1:0] peak;
  shift_e cmd;
  int checks = 0, failures = 0;

  center_tap_tracker #(.NTAPS(NTAPS), .CW(CW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int p, big;
      shift_e exp_cmd;
      p   = t % NTAPS;
      big = 20000 + int'($urandom_range(100000));
      for (int n = 0; n < NTAPS; n++) begin
        c_re[n] = CW'($signed($urandom_range(2000)) - 1000);
        c_im[n] = CW'($signed($urandom_range(2000)) - 1000);
      end
      case ((t / NTAPS) % 3)
        0: c_re[p] = ($urandom_range(1) != 0) ? CW'(big) : -CW'(big);
        1: c_im[p] = ($urandom_range(1) != 0) ? CW'(big) : -CW'(big);
        default: begin c_re[p] = CW'(big / 2); c_im[p] = -CW'(big / 2); end
      endcase
      #1;
      exp_cmd = (p >= 7) ? SH_LEFT : (p <= 3) ? SH_RIGHT : SH_NONE;
      checks++;
      if (int'(peak) != p || cmd != exp_cmd) begin
        failures++;
        $display("FAIL t=%0d planted %0d got peak %0d cmd %0d", t, p, peak, cmd);
      end
    end
    // tie: equal energy on taps 2 and 8 -> lowest index wins
    for (int n = 0; n < NTAPS; n++) begin c_re[n] = '0; c_im[n] = '0; end
    c_re[2] = 18'sd5000; c_im[8] = -18'sd5000;
    #1;
    checks++;
    if (peak != 2 || cmd != SH_RIGHT) begin
      failures++;
      $display("FAIL tie peak %0d cmd %0d", peak, cmd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
