// Self-checking test of gmii_rx: frames of random length with preamble and SFD are
// sent byte by byte; the packed words, byte counts and frame markers are compared
// with the expected packing. A stream without SFD must produce nothing.
module gmii_rx_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, rx_dv = 0, byte_en = 1;
  logic [7:0] rxd = 0;
  logic out_valid; strm_word_t out_word;
  always #5 clk = ~clk;
  gmii_rx dut (.*);
  initial begin #2000000; chk(0, "watchdog"); finish_tb(); end
  strm_word_t exp_q [$];
  int got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    got++;
    chk(exp_q.size() > 0 && out_word == exp_q[0],
        $sformatf("word %h n%0d s%0d e%0d", out_word.data, out_word.nbytes, out_word.sof, out_word.eof));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
  task automatic send(input logic [7:0] b[], input bit sfd);
    for (int i = 0; i < 7; i++) begin @(negedge clk); rx_dv = 1; rxd = 8'h55; end
    @(negedge clk); rxd = sfd ? 8'hD5 : 8'h55;
    foreach (b[i]) begin @(negedge clk); rxd = b[i]; end
    @(negedge clk); rx_dv = 0; rxd = 0;
    repeat (12) @(negedge clk);
  endtask
  initial begin
    logic [7:0] b[]; strm_word_t w; int n, exp_total;
    exp_total = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      n = $urandom_range(1, 70);
      b = new[n]; foreach (b[i]) b[i] = 8'($urandom);
      for (int i = 0; i < n; i += 4) begin
        w = '0;
        w.nbytes = 3'((n - i) >= 4 ? 4 : n - i);
        for (int j = 0; j < 4; j++) if (i + j < n) w.data[31-8*j -: 8] = b[i+j];
        w.sof = (i == 0); w.eof = (i + 4 >= n);
        exp_q.push_back(w); exp_total++;
      end
      send(b, 1'b1);
    end
    b = new[20]; send(b, 1'b0);
    chk(got == exp_total && exp_q.size() == 0, "all words, nothing without SFD");
    finish_tb();
  end
endmodule
