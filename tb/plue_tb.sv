// Self-checking test of plue: identification numbers are written with buffer
// pointers, searched and removed; every search must answer exactly three cycles
// after the request (input register plus a two-cycle search).
module plue_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  localparam int M = 16, W = 20;
  logic clk = 0, rst_n = 0, req = 0, upd_wp = 0;
  logic [1:0] op = 0; logic [15:0] key = 0; logic [W-1:0] wptr = 0;
  logic done, hit, full; logic [W-1:0] ptr;
  always #5 clk = ~clk;
  plue dut (.*);
  initial begin #1000000; chk(0, "watchdog"); finish_tb(); end

  logic [W-1:0] model [logic [15:0]];

  task automatic search(input logic [15:0] k, input lue_op_e o);
    int lat;
    @(negedge clk); req = 1; op = o; key = k; @(negedge clk); req = 0; key = $urandom;
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("search latency %0d", lat));
    chk(hit == model.exists(k), $sformatf("hit for %h: got %0d op %0d t=%0t", k, hit, o, $time));
    if (hit && model.exists(k)) chk(ptr == model[k], "result pointer");
    if (o == LUE_REMOVE) model.delete(k);
  endtask

  initial begin
    logic [15:0] k;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      k = 16'($urandom_range(0, 30));
      if (t % 3 == 0 && !model.exists(k) && !full) begin
        @(negedge clk); req = 1; op = LUE_WRITE; key = k; wptr = W'($urandom);
        model[k] = wptr;
        @(negedge clk); req = 0; upd_wp = 1; @(negedge clk); upd_wp = 0;
      end else if (t % 3 == 1) search(k, LUE_REMOVE);
      else search(k, LUE_READ);
    end
    finish_tb();
  end
endmodule
