// Self-checking test of control_memory: random writes over the whole address range,
// then reads with one cycle of latency against a reference map.
module control_memory_tb;
  `include "tb_check.svh"
  localparam int AW = 20;
  logic clk = 0, we = 0; logic [AW-1:0] addr = 0; logic [31:0] wdata = 0, rdata;
  always #5 clk = ~clk;
  control_memory dut (.*);
  initial begin #2000000; chk(0, "watchdog"); finish_tb(); end
  initial begin
    logic [31:0] model [logic [AW-1:0]]; logic [AW-1:0] a [$];
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); we = 1; addr = AW'($urandom); wdata = $urandom;
      model[addr] = wdata; a.push_back(addr);
    end
    @(negedge clk); we = 0;
    foreach (a[i]) begin
      addr = a[i]; @(negedge clk);
      chk(rdata == model[a[i]], "read back");
    end
    finish_tb();
  end
endmodule
