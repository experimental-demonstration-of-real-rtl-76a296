// Testbench for symbol_fifo. The write side (250 MHz) delivers 1, 2 or 3
// random QPSK symbols per cycle (two on average, as the equalizer does); the
// read clock is asynchronous. Phase 1: the reader is slightly faster than the
// writer, so the FIFO drains and underflows now and then; every word read must
// carry the next four symbols written, in order. Phase 2: the reader is slow,
// the FIFO fills up, words are dropped and counted as overflows, and the
// fill seen from the write side must never pass the depth. It also checks
// that reading starts only once half the depth is stored.
`timescale 1ps/1ps
module tb_symbol_fifo;
  import fdm_rx_pkg::*;
  localparam int DEPTH = 32, SPW = 4;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0, rd_clk = 1'b0, rd_rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] in_cnt = '0;
  qpsk_sym_t in_sym [3];
  logic [AW:0] wr_fill;
  logic [15:0] overflow_cnt;
  logic out_valid, underflow;
  logic [2*SPW-1:0] out_word;
  int checks = 0, failures = 0;
  int rd_half = 3950;
  bit phase2 = 1'b0;
  qpsk_sym_t exp_q [$];
  int n_written = 0, n_words_rd = 0, n_under = 0, max_fill = 0;
  bit first_word = 1'b1;

  symbol_fifo #(.DEPTH(DEPTH), .SPW(SPW)) dut (.*);

  always #2000 clk = ~clk;
  always #(rd_half) rd_clk = ~rd_clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side
  always @(negedge clk) if (rst_n) begin
    int c;
    c = 1 + int'($urandom_range(1)) + int'($urandom_range(1));
    in_valid <= 1'b1;
    in_cnt <= 2'(c);
    for (int k = 0; k < 3; k++) begin
      qpsk_sym_t s;
      s = qpsk_sym_t'($urandom);
      in_sym[k] <= s;
      if (k < c && !phase2) exp_q.push_back(s);
    end
    n_written += c;
    if (int'(wr_fill) > max_fill) max_fill = int'(wr_fill);
  end

  // read side
  always @(posedge rd_clk) if (rd_rst_n) begin
    #1;
    if (underflow) n_under++;
    if (out_valid) begin
      n_words_rd++;
      if (first_word) begin
        first_word = 1'b0;
        checks++;
        if (n_written < 4 * DEPTH / 2) begin
          failures++;
          $display("FAIL reading started after only %0d symbols", n_written);
        end
      end
      if (!phase2) begin
        checks++;
        for (int k = 0; k < SPW; k++) begin
          qpsk_sym_t e;
          e = exp_q.pop_front();
          if (out_word[2*k +: 2] != e) begin
            failures++;
            $display("FAIL word %0d symbol %0d got %0d exp %0d", n_words_rd, k, out_word[2*k +: 2], e);
            break;
          end
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 3; k++) in_sym[k] = '0;
    #10000;
    @(posedge clk); #1 rst_n = 1'b1;
    @(posedge rd_clk); #1 rd_rst_n = 1'b1;
    repeat (20000) @(posedge clk);
    $display("phase 1: %0d words read, %0d underflow clocks, max fill %0d", n_words_rd, n_under, max_fill);
    checks++;
    if (n_under == 0) begin failures++; $display("FAIL no underflow in phase 1"); end
    checks++;
    if (overflow_cnt != 0) begin failures++; $display("FAIL overflow in phase 1"); end
    // phase 2: slow reader
    @(negedge clk);
    phase2 = 1'b1;
    rd_half = 4400;
    repeat (20000) @(posedge clk);
    $display("phase 2: overflow count %0d, max fill %0d", overflow_cnt, max_fill);
    checks++;
    if (overflow_cnt == 0) begin failures++; $display("FAIL no overflow in phase 2"); end
    checks++;
    if (max_fill > DEPTH) begin failures++; $display("FAIL fill above depth"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
