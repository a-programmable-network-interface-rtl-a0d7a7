// Self-checking test of cam: random writes, wildcards and invalidations against a
// reference table; the match vector and the free-entry index are checked.
module cam_tb;
  `include "tb_check.svh"
  localparam int E = 16, K = 16;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] key = 0, wkey = 0; logic [E-1:0] hit, inv = 0, valid;
  logic we = 0, wwild = 0, full; logic [3:0] waddr = 0, free_idx;
  always #5 clk = ~clk;
  cam dut (.*);
  initial begin #500000; chk(0, "watchdog"); finish_tb(); end
  initial begin
    logic [K-1:0] rk [E]; bit rv [E]; bit rw [E];
    logic [E-1:0] eh; int ff;
    foreach (rv[i]) begin rv[i] = 0; rw[i] = 0; rk[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      case ($urandom_range(0, 2))
        0: begin
          we = 1; waddr = 4'($urandom); wkey = 16'($urandom_range(0, 40)); wwild = ($urandom_range(0, 9) == 0);
          @(negedge clk); we = 0;
          rv[waddr] = 1; rk[waddr] = wkey; rw[waddr] = wwild;
        end
        1: begin
          inv = 16'($urandom) & 16'($urandom); @(negedge clk);
          for (int i = 0; i < E; i++) if (inv[i]) rv[i] = 0;
          inv = 0;
        end
        default: ;
      endcase
      key = 16'($urandom_range(0, 40)); #1;
      for (int i = 0; i < E; i++) eh[i] = rv[i] && (rw[i] || rk[i] == key);
      ff = -1; for (int i = E - 1; i >= 0; i--) if (!rv[i]) ff = i;
      chk(hit == eh, $sformatf("hit %h exp %h", hit, eh));
      chk(full == (ff < 0) && (ff < 0 || free_idx == 4'(ff)), "free index");
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
