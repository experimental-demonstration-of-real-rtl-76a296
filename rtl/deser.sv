// 1:4 deserializer for the I and Q converter streams.
//
// The two converters deliver one 10-bit sample each per 1 GHz sample clock.
// The FPGA logic runs at a quarter of that rate, so this block collects four
// consecutive samples of each stream in a shift register and, every fourth
// sample clock, copies them into an output word that then stays stable for
// four sample clocks. Element 0 of a word is the oldest sample, element 3 the
// newest.
//
// Timing: the word register is loaded on the sample clock edge at which the
// phase counter equals LOAD_PHASE. The 250 MHz logic clock is expected to be
// the sample clock divided by four with its rising edge on phase 0 (the reset
// is released in step with it), so the word is captured one sample clock after
// it was loaded. word_stb pulses for one sample clock when a new word is
// loaded. The deserialization ratio comes from the 1 GS/s to 250 MHz rates;
// the load phase and strobe are this design's choices.
module deser #(
  parameter int unsigned W          = 10,
  parameter int unsigned RATIO      = 4,
  parameter int unsigned LOAD_PHASE = 3
) (
  input  logic                    clk_smp,   // sample clock
  input  logic                    rst_n,
  input  logic signed [W-1:0]     in_i,
  input  logic signed [W-1:0]     in_q,
  output logic signed [W-1:0]     word_i [RATIO],
  output logic signed [W-1:0]     word_q [RATIO],
  output logic                    word_stb
);

  logic [$clog2(RATIO)-1:0] phase;
  logic signed [W-1:0] sr_i [RATIO];
  logic signed [W-1:0] sr_q [RATIO];

  // Shift register: the newest sample enters at the top index.
  always_ff @(posedge clk_smp or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      for (int k = 0; k < RATIO; k++) begin
        sr_i[k] <= '0;
        sr_q[k] <= '0;
      end
    end else begin
      phase <= (phase == RATIO[$clog2(RATIO)-1:0] - 1'b1) ? '0 : phase + 1'b1;
      for (int k = 0; k < RATIO - 1; k++) begin
        sr_i[k] <= sr_i[k+1];
        sr_q[k] <= sr_q[k+1];
      end
      sr_i[RATIO-1] <= in_i;
      sr_q[RATIO-1] <= in_q;
    end
  end

  // Word register: loaded with the shift register plus the sample arriving now,
  // i.e. the RATIO samples received at phases LOAD_PHASE-RATIO+1 .. LOAD_PHASE.
  always_ff @(posedge clk_smp or negedge rst_n) begin
    if (!rst_n) begin
      word_stb <= 1'b0;
      for (int k = 0; k < RATIO; k++) begin
        word_i[k] <= '0;
        word_q[k] <= '0;
      end
    end else begin
      word_stb <= (phase == LOAD_PHASE[$clog2(RATIO)-1:0]);
      if (phase == LOAD_PHASE[$clog2(RATIO)-1:0]) begin
        for (int k = 0; k < RATIO - 1; k++) begin
          word_i[k] <= sr_i[k+1];
          word_q[k] <= sr_q[k+1];
        end
        word_i[RATIO-1] <= in_i;
        word_q[RATIO-1] <= in_q;
      end
    end
  end

endmodule
