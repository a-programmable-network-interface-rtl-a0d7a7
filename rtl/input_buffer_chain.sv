// input_buffer_chain: the 32-bit flip-flop chain through which received words
// stream. Each accepted word enters stage 0 and moves one stage further on every
// later accepted word, so a word is visible at a known stage for exactly as long
// as the controller needs; the functional pages read the stages they need, which
// keeps the fan-out of any single register low. The word leaving the last stage
// is the payload handed on once the accept/discard decision is known, so DEPTH
// must cover the decision latency. DEPTH is this design's choice (the architecture
// sizes it from the decision latency at design time); the optional RAM FIFO at the
// end of the chain is not included.
// Timing: a word pushed at cycle t is in stage 0 from t+1 and leaves the chain
// (out_valid) on the push that moves it out of stage DEPTH-1.
module input_buffer_chain
  import ppp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  strm_word_t  in_word,
  input  logic        flush,       // push DEPTH bubbles out: drain at end of frame
  output strm_word_t  taps  [DEPTH],
  output logic        tap_v [DEPTH],
  output logic        out_valid,
  output strm_word_t  out_word
);
  strm_word_t stage [DEPTH];
  logic       sv    [DEPTH];
  logic       shift;

  assign shift = in_valid || flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        stage[i] <= '0; sv[i] <= 1'b0;
      end
      out_valid <= 1'b0; out_word <= '0;
    end else begin
      out_valid <= shift && sv[DEPTH-1];
      if (shift) begin
        out_word <= stage[DEPTH-1];
        stage[0] <= in_word;
        sv[0]    <= in_valid;
        for (int i = 1; i < DEPTH; i++) begin
          stage[i] <= stage[i-1];
          sv[i]    <= sv[i-1];
        end
      end
    end
  end

  assign taps  = stage;
  assign tap_v = sv;
endmodule
