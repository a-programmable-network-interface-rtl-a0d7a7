// Self-checking test of crc_fp. The four-bit engine (default STEPS=1) and a 32-bit
// instance (STEPS=8) are compared with a bit-serial shift-register model for random
// 16, 24 and 32-bit polynomials, and the Ethernet check is run on a frame with a
// correct and with a corrupted frame check sequence. The four-bit engine must take
// one nibble per clock.
module crc_fp_tb;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [1:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic start = 0, en = 0, v4 = 0, v32 = 0;
  logic [3:0] d4 = 0; logic [31:0] d32 = 0; logic [3:0] n32 = 0;
  logic [31:0] crc4, crc32; logic ok4, ok32;
  always #5 clk = ~clk;

  crc_fp u4 (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .start, .en, .din_valid(v4),
             .din(d4), .din_nibs(1'b1), .crc(crc4), .crc_ok(ok4));
  crc_fp #(.STEPS(8)) u32 (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .start, .en,
             .din_valid(v32), .din(d32), .din_nibs(n32), .crc(crc32), .crc_ok(ok32));

  initial begin #2000000; chk(0, "watchdog"); finish_tb(); end

  task automatic cfg(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d; @(negedge clk); cfg_we = 0;
  endtask

  // bit-serial reference: n-bit register, bits MSB first of each byte unless lsbf
  function automatic logic [31:0] ref_crc(input logic [7:0] b[], input int n, input logic [31:0] poly,
                                          input logic [31:0] init, input bit lsbf);
    logic [31:0] c, msk; logic fb, bit_i;
    msk = (n == 32) ? 32'hFFFFFFFF : ((32'h1 << n) - 1);
    c = init & msk;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      bit_i = lsbf ? b[i][k] : b[i][7-k];
      fb = c[n-1] ^ bit_i;
      c = ((c << 1) & msk) ^ (fb ? (poly & msk) : 32'h0);
    end
    return c;
  endfunction

  task automatic run(input logic [7:0] b[], input bit lsbf);
    int nb;
    @(negedge clk); start = 1; @(negedge clk); start = 0; en = 1;
    // 32-bit instance: one word per clock
    nb = b.size();
    for (int i = 0; i < nb; i += 4) begin
      d32 = 0;
      for (int j = 0; j < 4; j++) if (i + j < nb) d32[31-8*j -: 8] = b[i+j];
      n32 = 4'(2 * ((nb - i) >= 4 ? 4 : nb - i));
      v32 = 1; @(negedge clk); v32 = 0;
    end
    // four-bit engine: one nibble per clock, arrival order
    begin
      int t0; t0 = $time;
      foreach (b[i]) for (int h = 0; h < 2; h++) begin
        d4 = lsbf ? (h == 0 ? b[i][3:0] : b[i][7:4]) : (h == 0 ? b[i][7:4] : b[i][3:0]);
        v4 = 1; @(negedge clk);
      end
      v4 = 0;
      chk(($time - t0) / 10 == 2 * nb, "four-bit engine takes one nibble per clock");
    end
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] b[]; logic [31:0] poly, init, e; int n; bit lsbf;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      n = (t % 3 == 0) ? 16 : (t % 3 == 1) ? 24 : 32;
      poly = $urandom; init = $urandom; lsbf = t[2];
      poly = (n == 32) ? poly : poly & ((32'h1 << n) - 1);
      init = (n == 32) ? init : init & ((32'h1 << n) - 1);
      cfg(0, poly); cfg(1, {29'd0, lsbf, n == 16 ? 2'd0 : n == 24 ? 2'd1 : 2'd2}); cfg(2, init);
      b = new[$urandom_range(1, 40)];
      foreach (b[i]) b[i] = 8'($urandom);
      run(b, lsbf);
      e = ref_crc(b, n, poly, init, lsbf);
      chk(crc4 == e, $sformatf("4-bit CRC%0d %h exp %h", n, crc4, e));
      chk(crc32 == e, $sformatf("32-bit CRC%0d %h exp %h", n, crc32, e));
    end
    // Ethernet: reflected CRC-32, complemented FCS sent least significant byte first
    cfg(0, 32'h04C11DB7); cfg(1, 32'h6); cfg(2, 32'hFFFFFFFF); cfg(3, 32'hC704DD7B);
    for (int t = 0; t < 6; t++) begin
      logic [31:0] fcs; logic [31:0] r;
      b = new[60 + t];
      foreach (b[i]) b[i] = 8'($urandom);
      r = 32'hFFFFFFFF;
      foreach (b[i]) for (int k = 0; k < 8; k++) r = (r >> 1) ^ (((r[0] ^ b[i][k]) ? 32'hEDB88320 : 0));
      fcs = ~r;
      b = new[b.size() + 4](b);
      for (int k = 0; k < 4; k++) b[b.size() - 4 + k] = fcs[8*k +: 8];
      if (t % 2 == 1) b[3] ^= 8'h10;
      run(b, 1'b1);
      chk(ok4 == (t % 2 == 0), "Ethernet FCS check, four-bit engine");
      chk(ok32 == (t % 2 == 0), "Ethernet FCS check, 32-bit instance");
    end
    finish_tb();
  end
endmodule
