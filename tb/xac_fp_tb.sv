// Self-checking test of xac_fp: loads reference, mask and mode, captures random and
// matching words, and compares every flag with a bitwise model.
module xac_fp_tb;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [1:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic start = 0; logic [31:0] word = 0;
  logic [31:0] vec; logic [3:0] byte_eq; logic [1:0] half_eq; logic word_eq, match;
  always #5 clk = ~clk;
  xac_fp dut (.*);

  initial begin #200000; chk(0, "watchdog"); finish_tb(); end

  task automatic cfg(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d; @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    logic [31:0] r, m, w;
    logic [1:0] mode, sel;
    logic [3:0] be; logic exp_m;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      r = $urandom; m = (t % 3 == 0) ? 32'hFFFFFFFF : $urandom;
      mode = 2'($urandom_range(0, 2)); sel = 2'($urandom);
      cfg(0, r); cfg(1, m); cfg(2, {26'd0, sel, 2'b00, mode});
      w = $urandom;
      if (t % 2 == 0) w = (r & m) | (w & ~m);          // equal under the mask
      if (t % 8 == 1) w = r ^ (32'h1 << $urandom_range(0, 31)); // one bit off
      @(negedge clk); start = 1; word = w; @(negedge clk); start = 0; word = $urandom;
      for (int s = 0; s < 4; s++) be[s] = (((w ^ r) & m) >> (8 * s)) % 256 == 0;
      case (mode)
        2'd0: exp_m = be[sel];
        2'd1: exp_m = sel[0] ? (be[2] & be[3]) : (be[0] & be[1]);
        default: exp_m = &be;
      endcase
      chk(vec == w, "extracted vector");
      chk(byte_eq == be, $sformatf("byte flags %b exp %b", byte_eq, be));
      chk(half_eq == {be[3] & be[2], be[1] & be[0]}, "half flags");
      chk(word_eq == &be, "word flag");
      chk(match == exp_m, $sformatf("match mode %0d sel %0d", mode, sel));
    end
    finish_tb();
  end
endmodule
