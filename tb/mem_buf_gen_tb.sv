// Self-checking test of mem_buf_gen: classes are placed with set, then advanced in
// random order; every class's address must follow base + k * stride.
module mem_buf_gen_tb;
  `include "tb_check.svh"
  localparam int W = 20;
  logic clk = 0, rst_n = 0, set = 0, advance = 0;
  logic [1:0] set_cls = 0, cls = 0, adv_cls = 0; logic [W-1:0] set_base = 0, addr; logic [11:0] set_stride = 0;
  always #5 clk = ~clk;
  mem_buf_gen dut (.*);
  initial begin #500000; chk(0, "watchdog"); finish_tb(); end
  initial begin
    logic [W-1:0] base [4]; logic [11:0] st [4]; int k [4];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 4; c++) begin
      cls = 2'(c); #1; chk(addr == W'(c) << (W - 2), "reset placement");
      base[c] = W'($urandom); st[c] = 12'($urandom_range(1, 4095)); k[c] = 0;
      @(negedge clk); set = 1; set_cls = 2'(c); set_base = base[c]; set_stride = st[c];
      @(negedge clk); set = 0;
    end
    for (int t = 0; t < 300; t++) begin
      int c; c = $urandom_range(0, 3);
      if ($urandom_range(0, 1)) begin
        advance = 1; adv_cls = 2'(c); @(negedge clk); advance = 0; k[c]++;
      end
      for (int j = 0; j < 4; j++) begin
        cls = 2'(j); #1;
        chk(addr == W'(base[j] + k[j] * st[j]), $sformatf("class %0d address", j));
      end
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
