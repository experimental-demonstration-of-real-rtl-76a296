// Testbench for deser: random 10-bit I and Q samples at the 1 GHz sample
// clock. At every strobe the output word must hold the last four samples
// (element 0 the oldest), the strobe must come every fourth sample clock, the
// first word must start with the first sample after reset, and a word must
// stay unchanged between strobes.
`timescale 1ps/1ps
module tb_deser;
  localparam int W = 10, RATIO = 4;

  logic clk_smp = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] in_i = '0, in_q = '0;
  logic signed [W-1:0] word_i [RATIO], word_q [RATIO];
  logic word_stb;
  int checks = 0, failures = 0;
  logic signed [W-1:0] hist_i [$], hist_q [$];
  int last_stb = -1, ncyc = 0, nwords = 0;
  logic signed [W-1:0] prev_i [RATIO];

  deser #(.W(W), .RATIO(RATIO)) dut (.*);

  always #500 clk_smp = ~clk_smp;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_smp) if (rst_n) begin
    hist_i.push_back(in_i);
    hist_q.push_back(in_q);
    ncyc++;
  end

  always @(negedge clk_smp) begin
    if (rst_n) begin
      in_i <= W'($urandom);
      in_q <= W'($urandom);
      if (word_stb) begin
        int n;
        n = hist_i.size();
        checks++;
        if (n < RATIO) begin
          failures++;
          $display("FAIL strobe after %0d samples", n);
        end else begin
          for (int k = 0; k < RATIO; k++)
            if (word_i[k] !== hist_i[n-RATIO+k] || word_q[k] !== hist_q[n-RATIO+k]) begin
              failures++;
              $display("FAIL word %0d element %0d", nwords, k);
              break;
            end
        end
        // first word aligned to the first sample after reset; rate one per RATIO
        checks++;
        if ((last_stb < 0 && n != RATIO) || (last_stb >= 0 && ncyc - last_stb != RATIO)) begin
          failures++;
          $display("FAIL strobe spacing: at %0d, previous %0d", ncyc, last_stb);
        end
        last_stb = ncyc;
        nwords++;
        prev_i = word_i;
      end else if (nwords > 0) begin
        checks++;
        if (word_i != prev_i) begin
          failures++;
          $display("FAIL word changed between strobes");
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk_smp);
    @(negedge clk_smp);
    rst_n = 1'b1;
    in_i = W'($urandom);
    in_q = W'($urandom);
    wait (nwords == 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
