// Self-checking test of cmaa. Two accelerators, with a three-cycle and a four-cycle
// SLUE, each with its own control memory, receive the same instruction stream, as
// the counter and controller would issue it back to back:
//  - the micro controller places the packet buffers and writes IPv4 and IPv6
//    connections into the SLUE;
//  - IPv4 first fragment (new packet), IPv4 later fragment (old packet), IPv6 new
//    packet, and a packet of an unknown connection.
// Checked: latency from NEW_PKT to packet_ready against the architecture's figures
// (IPv4 new 9/10, old fragment 4/4, IPv6 new 11/12), the buffer chosen (new buffer vs.
// the fragment's stored one), the connection pointer written into the packet buffer,
// discard for an unknown connection, direct packet-buffer access while ready, the
// new-packet flag after release and that the micro controller is kept off the
// memory while a packet is processed.
module cmaa_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  localparam int W = 20;
  logic clk = 0, rst_n = 0;
  logic iv = 0; cmaa_instr_t ins = '0; logic [31:0] d0 = 0, d1 = 0;
  logic ppp_req = 0, ppp_we = 0; logic [7:0] ppp_off = 0; logic [31:0] ppp_wdata = 0;
  logic uc_req = 0, uc_we = 0; logic [W-1:0] uc_addr = 0; logic [31:0] uc_wdata = 0;
  always #5 clk = ~clk;

  logic [31:0] dbo [2]; logic rdy [2], disc [2], fold [2], busy [2], unp [2], pf [2], sf [2], gnt [2];
  logic [W-1:0] pbuf [2]; logic cwe [2]; logic [W-1:0] caddr [2]; logic [31:0] cwd [2], crd [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    cmaa #(.SLUE_CYCLES(3 + g)) dut (
      .clk, .rst_n, .instr_valid(iv), .instr(ins), .dbus0(d0), .dbus1_in(d1), .dbus1_out(dbo[g]),
      .packet_ready(rdy[g]), .discard(disc[g]), .frag_old(fold[g]), .pkt_buf(pbuf[g]), .busy(busy[g]),
      .uc_new_packet(unp[g]), .plue_full(pf[g]), .slue_full(sf[g]),
      .ppp_req, .ppp_we, .ppp_off, .ppp_wdata, .uc_req, .uc_we, .uc_addr, .uc_wdata, .uc_gnt(gnt[g]),
      .cm_we(cwe[g]), .cm_addr(caddr[g]), .cm_wdata(cwd[g]));
    control_memory #(.AW(W)) mem (.clk, .we(cwe[g]), .addr(caddr[g]), .wdata(cwd[g]), .rdata(crd[g]));
  end

  initial begin #1000000; chk(0, "watchdog"); finish_tb(); end

  int unp_cnt [2] = '{0, 0};
  always @(posedge clk) for (int g = 0; g < 2; g++) if (unp[g]) unp_cnt[g]++;

  task automatic issue(input cmaa_op_e op, input logic [7:0] cfg, input logic [31:0] a0, input logic [31:0] a1 = 0);
    iv = 1; ins = '{op: op, cfg: cfg}; d0 = a0; d1 = a1;
    @(negedge clk);
    iv = 0; ins = '0;
  endtask

  function automatic logic [7:0] npc(input bit frag, input bit l4, input logic [5:0] t);
    return {frag, l4, t};
  endfunction

  // run one packet: NEW_PKT, key loads, optional PA read; measure both latencies
  task automatic packet(input logic [15:0] id, input bit frag, input bit l4, input logic [5:0] t,
                        input logic [31:0] words [$], input logic [2:0] idx [$], output int lat [2]);
    int n;
    lat = '{-1, -1};
    iv = 1; ins = '{op: CI_NEW_PKT, cfg: npc(frag, l4, t)}; d0 = {16'd0, id};
    @(negedge clk); n = 1;
    foreach (words[i]) begin
      iv = 1; ins = '{op: CI_LOAD_REG, cfg: {5'd0, idx[i]}}; d0 = words[i];
      for (int g = 0; g < 2; g++) if (rdy[g] && lat[g] < 0) lat[g] = n;
      @(negedge clk); n++;
    end
    if (l4) begin
      iv = 1; ins = '{op: CI_PA_CAM, cfg: {6'd0, LUE_READ}}; d0 = 0;
      for (int g = 0; g < 2; g++) if (rdy[g] && lat[g] < 0) lat[g] = n;
      @(negedge clk); n++;
    end
    iv = 0; ins = '0;
    while ((lat[0] < 0 || lat[1] < 0) && n < 40) begin
      for (int g = 0; g < 2; g++) if (rdy[g] && lat[g] < 0) lat[g] = n;
      // the micro controller must be kept off the memory meanwhile
      uc_req = 1; #1; chk(!gnt[0] && !gnt[1], "no micro controller access during a packet"); uc_req = 0;
      @(negedge clk); n++;
    end
  endtask

  task automatic release_pkt();
    issue(CI_RELEASE, 8'd0, 0);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int lat [2]; logic [31:0] w [$]; logic [2:0] x [$];
    logic [W-1:0] buf_a [2];
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // packet buffers at 0x1000, 32 words each
    issue(CI_SET_BUF, 8'd0, 0, {12'd32, 20'h01000});
    // IPv4 connection, type 4: ports 1234->80, SA 10.0.0.1, DA 10.0.0.2 -> pointer 0x2A000
    issue(CI_LOAD_REG, 8'd5, 32'd4);
    issue(CI_LOAD_REG, 8'd0, {16'd1234, 16'd80});
    issue(CI_LOAD_REG, 8'd1, 32'h0A000001);
    issue(CI_LOAD_REG, 8'd2, 0); issue(CI_LOAD_REG, 8'd3, 0);
    issue(CI_LOAD_REG, 8'd4, 32'h0A000002);
    issue(CI_PA_CAM, {6'd0, LUE_WRITE}, {6'b000000, 6'd0, 20'h2A000});
    // IPv6 unicast connection, type 6: ports 5000->443, 128-bit source, any destination
    issue(CI_LOAD_REG, 8'd5, 32'd6);
    issue(CI_LOAD_REG, 8'd0, {16'd5000, 16'd443});
    issue(CI_LOAD_REG, 8'd1, 32'h20010db8); issue(CI_LOAD_REG, 8'd2, 32'h00000000);
    issue(CI_LOAD_REG, 8'd3, 32'h0000ff00); issue(CI_LOAD_REG, 8'd4, 32'h00420001);
    issue(CI_PA_CAM, {6'd0, LUE_WRITE}, {6'b000000, 6'd0, 20'h3B000});
    repeat (2) @(negedge clk);

    // 1. IPv4, first fragment of a new packet: ports, SA, DA
    w = '{{16'd1234, 16'd80}, 32'h0A000001, 32'h0A000002}; x = '{3'd0, 3'd1, 3'd4};
    packet(16'h7001, 1'b1, 1'b1, 6'd4, w, x, lat);
    chk(lat[0] == 9, $sformatf("IPv4 new packet latency %0d (3-cycle SLUE)", lat[0]));
    chk(lat[1] == 10, $sformatf("IPv4 new packet latency %0d (4-cycle SLUE)", lat[1]));
    for (int g = 0; g < 2; g++) begin
      chk(!disc[g] && !fold[g], "known connection, first fragment");
      chk(pbuf[g] == 20'h01000, $sformatf("new packet buffer %h", pbuf[g]));
      chk(dbo[g] == 32'h2A000, "connection pointer on dbus1");
      buf_a[g] = pbuf[g];
    end
    // the packet buffer holds the connection pointer; the C&C writes a variable
    ppp_req = 1; ppp_we = 0; ppp_off = 0; @(negedge clk); ppp_req = 0;
    for (int g = 0; g < 2; g++) chk(crd[g] == 32'h2A000, "connection pointer stored in packet buffer");
    ppp_req = 1; ppp_we = 1; ppp_off = 8'd3; ppp_wdata = 32'd1480; @(negedge clk); ppp_req = 0; ppp_we = 0;
    release_pkt();
    for (int g = 0; g < 2; g++) chk(unp_cnt[g] == 1, "new-packet flag to the micro controller");

    // 2. IPv4, later fragment of the same packet, no layer-4 header
    w = '{}; x = '{};
    packet(16'h7001, 1'b1, 1'b0, 6'd4, w, x, lat);
    chk(lat[0] == 4 && lat[1] == 4, $sformatf("old packet, new fragment latency %0d/%0d", lat[0], lat[1]));
    for (int g = 0; g < 2; g++) begin
      chk(fold[g] && pbuf[g] == buf_a[g], "fragment finds its packet buffer");
    end
    ppp_req = 1; ppp_we = 0; ppp_off = 8'd3; @(negedge clk); ppp_req = 0;
    for (int g = 0; g < 2; g++) chk(crd[g] == 32'd1480, "variable of the earlier fragment");
    // all fragments in: remove the identification from the PLUE
    issue(CI_ID_CAM, {6'd0, LUE_REMOVE}, 32'h7001);
    repeat (4) @(negedge clk);
    release_pkt();

    // 3. IPv6 new packet, not fragmented: ports and four source words
    w = '{{16'd5000, 16'd443}, 32'h20010db8, 32'h00000000, 32'h0000ff00, 32'h00420001};
    x = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4};
    packet(16'h0, 1'b0, 1'b1, 6'd6, w, x, lat);
    chk(lat[0] == 11, $sformatf("IPv6 new packet latency %0d (3-cycle SLUE)", lat[0]));
    chk(lat[1] == 12, $sformatf("IPv6 new packet latency %0d (4-cycle SLUE)", lat[1]));
    for (int g = 0; g < 2; g++) begin
      chk(!disc[g] && dbo[g] == 32'h3B000, "IPv6 connection found");
      chk(pbuf[g] == 20'h01020, $sformatf("next packet buffer %h", pbuf[g]));
    end
    release_pkt();

    // 4. same identification again: removed from the PLUE, so a new buffer
    w = '{}; x = '{};
    packet(16'h7001, 1'b1, 1'b0, 6'd4, w, x, lat);
    for (int g = 0; g < 2; g++) chk(!fold[g], "removed identification is not found");
    release_pkt();

    // 5. unknown connection is discarded
    w = '{{16'd1234, 16'd81}, 32'h0A000001, 32'h0A000002}; x = '{3'd0, 3'd1, 3'd4};
    packet(16'h0, 1'b0, 1'b1, 6'd4, w, x, lat);
    for (int g = 0; g < 2; g++) chk(disc[g], "unknown connection discarded");
    // nothing to store: reported one cycle before a hit would be
    chk(lat[0] == 8 && lat[1] == 9, $sformatf("unknown connection latency %0d/%0d", lat[0], lat[1]));
    release_pkt();

    // micro controller reaches the memory while the accelerator waits
    uc_req = 1; uc_we = 1; uc_addr = 20'h00040; uc_wdata = 32'hCAFE; #1;
    chk(gnt[0] && gnt[1], "micro controller access while waiting");
    @(negedge clk); uc_we = 0; @(negedge clk); uc_req = 0;
    for (int g = 0; g < 2; g++) chk(crd[g] == 32'hCAFE, "micro controller write/read");
    finish_tb();
  end
endmodule
