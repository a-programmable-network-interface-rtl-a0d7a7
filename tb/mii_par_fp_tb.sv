// Self-checking test of mii_par_fp: frames are sent as MII nibbles, low nibble of
// each byte first, and must come out as the same aligned 32-bit words a GMII port
// would give. For half of the frames the nibbles arrive only on some clocks (nib_en
// low in between, with garbage on rxd), as when the core clock is faster than the
// MII clock.
module mii_par_fp_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, rx_dv = 0, nib_en = 0;
  bit gaps = 0;
  logic [3:0] rxd = 0;
  logic out_valid; strm_word_t out_word;
  always #5 clk = ~clk;
  mii_par_fp dut (.*);
  initial begin #2000000; chk(0, "watchdog"); finish_tb(); end
  strm_word_t exp_q [$];
  int got = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    got++;
    chk(exp_q.size() > 0 && out_word == exp_q[0], $sformatf("word %h", out_word.data));
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
  task automatic one(input logic [3:0] x);
    @(negedge clk);
    if (gaps) repeat ($urandom_range(0, 3)) begin
      nib_en = 0; rxd = 4'($urandom); @(negedge clk);
    end
    rx_dv = 1; nib_en = 1; rxd = x;
  endtask
  task automatic nib(input logic [7:0] x);
    one(x[3:0]); one(x[7:4]);
  endtask
  initial begin
    logic [7:0] b[]; strm_word_t w; int n, tot;
    tot = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      gaps = t[0];
      n = $urandom_range(1, 64);
      b = new[n]; foreach (b[i]) b[i] = 8'($urandom);
      for (int i = 0; i < n; i += 4) begin
        w = '0; w.nbytes = 3'((n - i) >= 4 ? 4 : n - i);
        for (int j = 0; j < 4; j++) if (i + j < n) w.data[31-8*j -: 8] = b[i+j];
        w.sof = (i == 0); w.eof = (i + 4 >= n);
        exp_q.push_back(w); tot++;
      end
      for (int i = 0; i < 7; i++) nib(8'h55);
      nib(8'hD5);
      foreach (b[i]) nib(b[i]);
      @(negedge clk); rx_dv = 0; nib_en = 0;
      repeat (16) @(negedge clk);
    end
    chk(got == tot && exp_q.size() == 0, $sformatf("word count %0d of %0d", got, tot));
    finish_tb();
  end
endmodule
