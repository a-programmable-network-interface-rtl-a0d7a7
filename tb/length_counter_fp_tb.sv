// Self-checking test of length_counter_fp: byte and word counting, operand adds and
// the equal and zero flags against a reference count.
module length_counter_fp_tb;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [31:0] cfg_wdata = 0;
  logic start = 0, ld_acc = 0, ld_stop = 0, add_op = 0, en = 0, din_valid = 0;
  logic [15:0] ld_val = 0; logic [2:0] din_bytes = 4;
  logic [15:0] acc, stop; logic eq, zero;
  always #5 clk = ~clk;
  length_counter_fp dut (.*);
  initial begin #500000; chk(0, "watchdog"); finish_tb(); end
  initial begin
    logic [15:0] e, s; int nw; bit words; logic [2:0] nb [20];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      words = t[0];
      @(negedge clk); cfg_we = 1; cfg_wdata = {31'd0, words}; @(negedge clk); cfg_we = 0;
      start = 1; @(negedge clk); start = 0;
      chk(zero && acc == 0, "cleared");
      e = 16'($urandom_range(0, 100)); ld_acc = 1; ld_val = e; @(negedge clk); ld_acc = 0;
      nw = $urandom_range(0, 20);
      // full words, the last one of a frame may be short
      s = e;
      for (int i = 0; i < nw; i++) begin
        nb[i] = (i == nw - 1) ? 3'($urandom_range(1, 4)) : 3'd4;
        s = s + (words ? 16'd1 : 16'(nb[i]));
      end
      if (t % 4 == 0) s = s + 1;    // never reached
      ld_stop = 1; ld_val = s; @(negedge clk); ld_stop = 0;
      en = 1;
      for (int i = 0; i < nw; i++) begin
        din_bytes = nb[i]; din_valid = 1; @(negedge clk); din_valid = 0;
        e = e + (words ? 16'd1 : 16'(nb[i]));
        chk(acc == e, "accumulator follows the stream");
      end
      en = 0; @(negedge clk);
      chk(eq == (t % 4 != 0), $sformatf("eq flag acc %0d stop %0d", acc, stop));
      ld_val = 16'($urandom); add_op = 1; @(negedge clk); add_op = 0;
      e = e + ld_val; @(negedge clk);
      chk(acc == e, "operand add");
      chk(zero == (e == 0), "zero flag");
    end
    finish_tb();
  end
endmodule
