// Self-checking test of checksum_fp: random word streams with short last words,
// loads and half-word adds, compared with an independent one's-complement sum; a
// header carrying its own correct checksum must raise ok.
module checksum_fp_tb;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  logic start = 0, ld = 0, add_op = 0, en = 0, din_valid = 0;
  logic [15:0] ld_val = 0; logic [31:0] din = 0; logic [2:0] din_bytes = 4;
  logic [15:0] sum; logic ok;
  always #5 clk = ~clk;
  checksum_fp dut (.*);
  initial begin #500000; chk(0, "watchdog"); finish_tb(); end

  function automatic logic [15:0] a1(input logic [15:0] a, input logic [15:0] b);
    int unsigned s; s = a + b; if (s > 16'hFFFF) s = s - 16'hFFFF; return 16'(s);
  endfunction

  initial begin
    logic [15:0] e; logic [31:0] w; int nw; int nb;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      e = 16'($urandom);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      ld = 1; ld_val = e; @(negedge clk); ld = 0;
      nw = $urandom_range(1, 12);
      en = 1;
      for (int i = 0; i < nw; i++) begin
        w = $urandom; nb = (i == nw - 1) ? $urandom_range(1, 4) : 4;
        din = w; din_bytes = 3'(nb); din_valid = 1; @(negedge clk); din_valid = 0;
        if (nb < 4) w = w & ~(32'hFFFFFFFF >> (8 * nb));
        e = a1(a1(e, w[31:16]), w[15:0]);
        if ($urandom_range(0, 1)) @(negedge clk);  // gaps between words
      end
      en = 0;
      ld_val = 16'($urandom); add_op = 1; @(negedge clk); add_op = 0;
      e = a1(e, ld_val);
      @(negedge clk);
      chk(sum == e, $sformatf("sum %h exp %h", sum, e));
      chk(ok == (e == 16'hFFFF), "ok flag");
    end
    // IPv4 header with a correct checksum
    begin
      logic [15:0] h[10]; logic [15:0] s;
      h = '{16'h4500, 16'h0073, 16'h0000, 16'h4000, 16'h4011, 16'h0000, 16'hc0a8, 16'h0001, 16'hc0a8, 16'h00c7};
      s = 0; foreach (h[i]) s = a1(s, h[i]);
      h[5] = ~s;
      @(negedge clk); start = 1; @(negedge clk); start = 0; en = 1;
      for (int i = 0; i < 5; i++) begin din = {h[2*i], h[2*i+1]}; din_bytes = 4; din_valid = 1; @(negedge clk); end
      din_valid = 0; en = 0; @(negedge clk);
      chk(ok == 1'b1, "valid IPv4 header checksum");
      @(negedge clk); start = 1; @(negedge clk); start = 0; en = 1;
      for (int i = 0; i < 5; i++) begin din = {h[2*i], h[2*i+1] ^ (i == 2 ? 16'h0100 : 16'h0)}; din_valid = 1; @(negedge clk); end
      din_valid = 0; en = 0; @(negedge clk);
      chk(ok == 1'b0, "corrupted IPv4 header checksum");
    end
    finish_tb();
  end
endmodule
