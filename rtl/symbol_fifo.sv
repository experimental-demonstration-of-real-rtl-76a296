// Output FIFO between the equalizer clock and the recovered symbol clock.
//
// The decisions leave the equalizer at an irregular rate: normally two QPSK
// symbols per cycle, three in the cycle after a left coefficient shift, one
// after a right shift. This block first packs them into words of SPW = 4
// symbols (symbol 0 in bits [1:0]). A cycle delivers at most three symbols and
// at most three are left over, so at most one word is completed per cycle.
// Words go through a dual-clock FIFO of DEPTH words (binary and Gray pointers,
// two-flop synchronizers) and are read in the recovered clock domain, one word
// per read clock.
//
// Write side (clk): in_valid with in_cnt symbols in in_sym[0..in_cnt-1],
// oldest first. wr_fill is the number of words stored as seen from the write
// side; it drives the PLL controller. A word that finds the FIFO full is
// dropped and counted in overflow_cnt.
// Read side (rd_clk): reading starts once the FIFO holds DEPTH/2 words and
// then runs every read clock; out_valid marks a word on out_word, and a clock
// that finds the FIFO empty raises underflow for that clock (no word).
// Buffering the irregular decision stream in a FIFO read by a clock derived
// from the FIFO filling follows the receiver description; the packing,
// depth, start rule and counters are this design's choices.
module symbol_fifo
  import fdm_rx_pkg::*;
#(
  parameter int unsigned DEPTH = 32,   // words, a power of two
  parameter int unsigned SPW   = 4     // symbols per word
) (
  // write side
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [1:0]                in_cnt,
  input  qpsk_sym_t                 in_sym [3],
  output logic [$clog2(DEPTH):0]    wr_fill,
  output logic [15:0]               overflow_cnt,
  // read side
  input  logic                      rd_clk,
  input  logic                      rd_rst_n,
  output logic                      out_valid,
  output logic [2*SPW-1:0]          out_word,
  output logic                      underflow
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned RN = SPW + 3;          // packing list: residue + input + spare

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = AW - 1; k >= 0; k--)
      b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  logic [2*SPW-1:0] mem [DEPTH];

  // ------------------------------------------------------------ packing
  qpsk_sym_t  res     [SPW-1];
  logic [2:0] res_cnt;
  qpsk_sym_t  lst     [RN];
  logic [3:0] lst_cnt;
  logic       word_rdy;
  logic [2*SPW-1:0] word;

  always_comb begin
    for (int k = 0; k < RN; k++)
      lst[k] = '0;
    for (int k = 0; k < SPW - 1; k++)
      if (k < int'(res_cnt)) lst[k] = res[k];
    for (int k = 0; k < 3; k++)
      if (in_valid && k < int'(in_cnt)) lst[int'(res_cnt) + k] = in_sym[k];
    lst_cnt  = 4'(res_cnt) + (in_valid ? 4'(in_cnt) : 4'd0);
    word_rdy = (lst_cnt >= 4'(SPW));
    for (int k = 0; k < SPW; k++)
      word[2*k +: 2] = lst[k];
  end

  // ------------------------------------------------------------ write side
  logic [AW:0] wbin, wgray;
  logic [AW:0] rbin, rgray_r;
  logic [AW:0] rgray_w1, rgray_w2;
  logic [AW:0] rbin_w;
  logic        full;

  assign rbin_w  = gray2bin(rgray_w2);
  assign wr_fill = wbin - rbin_w;
  assign full    = (wr_fill == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin         <= '0;
      wgray        <= '0;
      rgray_w1     <= '0;
      rgray_w2     <= '0;
      res_cnt      <= '0;
      overflow_cnt <= '0;
      for (int k = 0; k < SPW - 1; k++)
        res[k] <= '0;
    end else begin
      rgray_w1 <= rgray_r;
      rgray_w2 <= rgray_w1;
      if (word_rdy) begin
        for (int k = 0; k < SPW - 1; k++)
          res[k] <= lst[k + SPW];
        res_cnt <= 3'(lst_cnt - 4'(SPW));
        if (!full) begin
          wbin  <= wbin + 1'b1;
          wgray <= bin2gray(wbin + 1'b1);
        end else if (overflow_cnt != '1) begin
          overflow_cnt <= overflow_cnt + 1'b1;
        end
      end else begin
        for (int k = 0; k < SPW - 1; k++)
          res[k] <= lst[k];
        res_cnt <= 3'(lst_cnt);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (word_rdy && !full)
      mem[wbin[AW-1:0]] <= word;
  end

  // ------------------------------------------------------------ read side
  logic [AW:0] wgray_r1, wgray_r2;
  logic [AW:0] rd_fill;
  logic        started;

  assign rd_fill = gray2bin(wgray_r2) - rbin;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin      <= '0;
      rgray_r   <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
      underflow <= 1'b0;
    end else begin
      wgray_r1  <= wgray;
      wgray_r2  <= wgray_r1;
      out_valid <= 1'b0;
      underflow <= 1'b0;
      if (!started) begin
        started <= (rd_fill >= (AW+1)'(DEPTH / 2));
      end else if (rd_fill != '0) begin
        out_valid <= 1'b1;
        out_word  <= mem[rbin[AW-1:0]];
        rbin      <= rbin + 1'b1;
        rgray_r   <= bin2gray(rbin + 1'b1);
      end else begin
        underflow <= 1'b1;
      end
    end
  end

  // a read clock either delivers a word or reports underflow, never both;
  // the write-side fill never exceeds the depth
  a_rd_excl: assert property (@(posedge rd_clk) disable iff (!rd_rst_n)
    !(out_valid && underflow));
  a_fill_max: assert property (@(posedge clk) disable iff (!rst_n)
    wr_fill <= (AW+1)'(DEPTH));

endmodule
