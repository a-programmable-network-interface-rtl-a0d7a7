// Self-checking test of input_buffer_chain: words pushed at random times must leave
// the chain in order after exactly DEPTH further pushes, with every tap holding the
// expected word; flush drains it.
module input_buffer_chain_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  localparam int D = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, flush = 0;
  strm_word_t in_word = '0;
  strm_word_t taps [D]; logic tap_v [D];
  logic out_valid; strm_word_t out_word;
  always #5 clk = ~clk;
  input_buffer_chain dut (.*);
  initial begin #500000; chk(0, "watchdog"); finish_tb(); end
  strm_word_t hist [$];
  int outs = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    chk(hist.size() > 0 && out_word == hist[0], "output order");
    if (hist.size() > 0) void'(hist.pop_front());
    outs++;
  end
  initial begin
    strm_word_t w; strm_word_t sent [$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      w = '{sof: (i % 20 == 0), eof: (i % 20 == 19), nbytes: 3'd4, data: $urandom};
      in_word = w; in_valid = 1; @(negedge clk); in_valid = 0;
      sent.push_back(w);
      hist.push_back(w);
      // taps hold the last D pushed words
      for (int k = 0; k < D && k < sent.size(); k++)
        chk(taps[k] == sent[sent.size() - 1 - k] && tap_v[k], "tap content");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    @(negedge clk);
    chk(outs == 200 - D, $sformatf("outputs after pushes: %0d", outs));
    flush = 1; repeat (D) @(negedge clk); flush = 0; @(negedge clk);
    chk(outs == 200, "flush drains the chain");
    finish_tb();
  end
endmodule
