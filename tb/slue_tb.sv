// Self-checking test of slue: connection entries with field wildcards (the usual patterns:
// IPv4 with and without source, IPv6 unicast, UDP port only) are written, then keys
// are searched against a reference classifier. Search latency must equal
// SEARCH_CYCLES; the test runs the three-cycle default and a four-cycle instance.
module slue_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  localparam int N = 64, W = 20;
  logic clk = 0, rst_n = 0, req = 0, upd_wp = 0;
  logic [1:0] op = 0; slue_key_t key = '0; logic [5:0] wild = 0; logic [W-1:0] wptr = 0;
  logic done3, hit3, full3, done4, hit4, full4; logic [W-1:0] ptr3, ptr4;
  always #5 clk = ~clk;
  slue u3 (.clk, .rst_n, .req, .op, .key, .wild, .wptr, .upd_wp, .done(done3), .hit(hit3), .ptr(ptr3), .full(full3));
  slue #(.SEARCH_CYCLES(4)) u4 (.clk, .rst_n, .req, .op, .key, .wild, .wptr, .upd_wp,
                                .done(done4), .hit(hit4), .ptr(ptr4), .full(full4));
  initial begin #3000000; chk(0, "watchdog"); finish_tb(); end

  slue_key_t ek [$]; logic [5:0] ew [$]; logic [W-1:0] ep [$];

  function automatic int ref_match(input slue_key_t k);
    for (int i = 0; i < ek.size(); i++)
      if ((ew[i][0] || ek[i].ptype == k.ptype) && (ew[i][1] || ek[i].sport == k.sport) &&
          (ew[i][2] || ek[i].dport == k.dport) && (ew[i][3] || ek[i].addr[127:64] == k.addr[127:64]) &&
          (ew[i][4] || ek[i].addr[63:32] == k.addr[63:32]) && (ew[i][5] || ek[i].addr[31:0] == k.addr[31:0]))
        return i;
    return -1;
  endfunction

  initial begin
    slue_key_t k; int m, l3, l4;
    repeat (2) @(negedge clk); rst_n = 1;
    // distinct types keep entries from overlapping, as the internal type is meant to
    for (int i = 0; i < 40; i++) begin
      k.ptype = 8'(i); k.sport = 16'($urandom); k.dport = 16'($urandom);
      k.addr = {$urandom, $urandom, $urandom, $urandom};
      case (i % 4)
        0: begin wild = 6'b110000; k.addr[95:0]  = '0; end   // IPv4 source only
        1: begin wild = 6'b000000; end                        // IPv6 unicast source
        2: begin wild = 6'b111010; end                        // UDP: type and destination port
        default: begin wild = 6'b001000; k.addr[127:64] = '0; end // IPv4 source and destination, 64-bit field
      endcase
      @(negedge clk); req = 1; op = LUE_WRITE; key = k; wptr = W'($urandom);
      ek.push_back(k); ew.push_back(wild); ep.push_back(wptr);
      @(negedge clk); req = 0; upd_wp = 1; @(negedge clk); upd_wp = 0;
    end
    for (int t = 0; t < 200; t++) begin
      m = $urandom_range(0, ek.size() - 1);
      k = ek[m];
      if (ew[m][1]) k.sport = 16'($urandom);
      if (ew[m][4]) k.addr[63:32] = $urandom;
      if (t % 3 == 0) k.addr[31:0] = k.addr[31:0] ^ 32'h100;   // usually a miss
      if (t % 7 == 0) k.ptype = 8'($urandom_range(64, 255));   // unknown type
      @(negedge clk); req = 1; op = LUE_READ; key = k; @(negedge clk); req = 0;
      l3 = 1; l4 = 1;
      while (!done3 && l3 < 10) begin @(negedge clk); l3++; end
      chk(l3 == 3, $sformatf("three-cycle search took %0d", l3));
      m = ref_match(k);
      chk(hit3 == (m >= 0), $sformatf("hit %0d exp %0d", hit3, m));
      if (m >= 0 && hit3) chk(ptr3 == ep[m], "pointer");
      while (!done4 && l4 < 10) begin @(negedge clk); l4++; end
      chk(l3 + l4 - 1 == 4, "four-cycle search");
      chk(hit4 == (m >= 0), "four-cycle hit");
    end
    // removal
    k = ek[1];
    @(negedge clk); req = 1; op = LUE_REMOVE; key = k; @(negedge clk); req = 0; repeat (5) @(negedge clk);
    @(negedge clk); req = 1; op = LUE_READ; key = k; @(negedge clk); req = 0; repeat (2) @(negedge clk);
    chk(done3 && !hit3, "removed entry no longer matches");
    finish_tb();
  end
endmodule
