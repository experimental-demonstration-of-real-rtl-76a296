// Testbench for fifo_pll_ctrl. Part 1 drives random FIFO fill levels and
// compares ctrl and the integrator each cycle with the PI law computed here
// (with a long stretch at a full FIFO). Part 2 closes
// the loop around a simple rate model: words arrive at 0.5 per cycle plus an
// offset of +1000 ppm, the read side removes 0.5 * (1 + ctrl * 2^-20) per
// cycle; the fill must settle at half depth and the integrator at about the
// offset (1000 ppm = 1049 units).
module tb_fifo_pll_ctrl;
  localparam int DEPTH = 32, CTRL_W = 20, KP = 11;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW:0] fill = '0;
  logic signed [CTRL_W-1:0] ctrl, integ;
  int checks = 0, failures = 0;

  fifo_pll_ctrl #(.DEPTH(DEPTH), .CTRL_W(CTRL_W), .KP_SHIFT(KP)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v);
    longint hi = (longint'(1) << (CTRL_W - 1)) - 1;
    longint lo = -(longint'(1) << (CTRL_W - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  longint m_integ, m_ctrl;
  real occ;

  initial begin
    m_integ = 0;
    m_ctrl = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      longint err;
      @(negedge clk);
      fill = (t > 500 && t < 2000) ? (AW+1)'(DEPTH) : (AW+1)'($urandom_range(DEPTH));
      err = longint'(fill) - DEPTH / 2;
      m_integ = sat(m_integ + err);
      m_ctrl = sat(m_integ + (err << KP));
      @(posedge clk);
      #1;
      checks++;
      if (longint'(ctrl) != m_ctrl || longint'(integ) != m_integ) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d ctrl %0d exp %0d integ %0d exp %0d", t, ctrl, m_ctrl, integ, m_integ);
      end
    end
    // part 2: closed loop
    rst_n = 1'b0;
    #5 rst_n = 1'b1;
    occ = 16.0;
    for (int t = 0; t < 60000; t++) begin
      @(negedge clk);
      occ += 0.5 * (1.0 + 1000e-6) - 0.5 * (1.0 + real'(ctrl) / 1048576.0);
      fill = (AW+1)'($rtoi(occ + 0.5));
    end
    $display("closed loop: occupancy %f integrator %0d", occ, integ);
    checks++;
    if (occ < 15.0 || occ > 17.0) begin failures++; $display("FAIL occupancy"); end
    checks++;
    if (integ < 900 || integ > 1200) begin failures++; $display("FAIL integrator %0d", integ); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
