// cmaa: control memory access accelerator. It classifies each received packet and
// gives the protocol processor fast access to the packet's variables in the shared
// control memory. The counter and controller (C&C) drives it with six instructions
// (ppp_pkg::cmaa_op_e) and two 32-bit data buses:
//   NEW_PKT   dbus0 = IP identification, cfg = {fragmented, has_l4, type}
//   LOAD_REG  dbus0 = ports (cfg 0) or address word 1..4 (bits 127:96 .. 31:0), or type (5)
//   ID_CAM    PLUE read/write/remove with dbus0[15:0] (write stores the packet buffer)
//   PA_CAM    SLUE read/write/remove with the loaded key; write: dbus0 = {wild, pointer}
//   RELEASE   the packet is done: hand the control memory back to the micro controller
//   SET_BUF   dbus1 = {stride[11:0], base} for buffer class cfg[1:0]
// Procedure: NEW_PKT latches the IP identification into the PLUE; a fragment is
// looked up there (two-cycle search). On a hit the stored packet-buffer address is
// used, on a miss (or for an unfragmented packet) a new buffer comes from the buffer
// generator and a fragment's identification is written into the PLUE. Key words load
// meanwhile; a PA_CAM read starts the SLUE search. A connection hit puts the
// connection pointer on dbus1 and, next cycle, writes it into the packet buffer; a
// miss raises discard. Then packet_ready is raised and the C&C may access the packet
// buffer directly (ppp_* port, address = buffer + offset). RELEASE leads to one
// update cycle (buffer pointer advance, CAM write indices, new-packet flag to the
// micro controller) and back to waiting. The micro controller reaches the memory
// only while the CMAA waits or updates.
// Latency from NEW_PKT to packet_ready with back-to-back instructions: old packet /
// new fragment without layer-4 header 4 cycles; new packet 9 (IPv4, three key words)
// or 11 (IPv6, five key words) with a three-cycle SLUE, one more with four cycles.
// A connection miss has nothing to store and is reported one cycle earlier (8 / 10);
// the architecture's latency figures cover only the hit case, so this is a design choice.
// The instruction set, the procedure and the latencies follow the architecture;
// encodings, the key layout and the access port are this design's choices.
module cmaa
  import ppp_pkg::*;
#(
  parameter int unsigned M = 16,
  parameter int unsigned N = 64,
  parameter int unsigned W = 20,
  parameter int unsigned SLUE_CYCLES = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          instr_valid,
  input  cmaa_instr_t   instr,
  input  logic [31:0]   dbus0,
  input  logic [31:0]   dbus1_in,
  output logic [31:0]   dbus1_out,       // connection pointer, zero-extended
  output logic          packet_ready,
  output logic          discard,
  output logic          frag_old,        // a fragment of this packet was seen before
  output logic [W-1:0]  pkt_buf,
  output logic          busy,
  output logic          uc_new_packet,
  output logic          plue_full,
  output logic          slue_full,
  // direct access of the C&C to the current packet buffer
  input  logic          ppp_req,
  input  logic          ppp_we,
  input  logic [7:0]    ppp_off,
  input  logic [31:0]   ppp_wdata,
  // micro controller access
  input  logic          uc_req,
  input  logic          uc_we,
  input  logic [W-1:0]  uc_addr,
  input  logic [31:0]   uc_wdata,
  output logic          uc_gnt,
  // control memory port
  output logic          cm_we,
  output logic [W-1:0]  cm_addr,
  output logic [31:0]   cm_wdata
);
  typedef enum logic [2:0] {S_WAIT, S_LOOK, S_CONN, S_WR, S_READY, S_UPDATE} st_e;
  st_e st;

  newpkt_cfg_t pcfg, icfg;
  assign icfg = newpkt_cfg_t'(instr.cfg);
  slue_key_t   key;
  logic        plue_req, slue_req;
  logic [1:0]  plue_op, slue_op;
  logic        plue_done, plue_hit, slue_done, slue_hit;
  logic [W-1:0] plue_ptr, slue_ptr, buf_addr;
  logic        frag_look;     // PLUE search of this packet outstanding
  logic        slue_got, slue_hit_q, slue_pend;
  logic [W-1:0] conn_ptr;
  logic        new_buf, plue_wr, slue_wr, plue_wr_d, slue_wr_d;
  logic        buf_set;
  logic [15:0] ipid;

  wire is_op  = instr_valid;
  wire op_np  = is_op && instr.op == CI_NEW_PKT && st == S_WAIT;
  wire op_ld  = is_op && instr.op == CI_LOAD_REG;
  wire op_id  = is_op && instr.op == CI_ID_CAM;
  wire op_pa  = is_op && instr.op == CI_PA_CAM;
  wire op_rel = is_op && instr.op == CI_RELEASE && st == S_READY;
  wire op_buf = is_op && instr.op == CI_SET_BUF;

  // ---------------- look-up engines ----------------
  always_comb begin
    plue_req = 1'b0; plue_op = LUE_READ;
    if (op_np && icfg.fragmented) begin
      plue_req = 1'b1; plue_op = LUE_READ;
    end else if (st == S_LOOK && plue_done && !plue_hit && frag_look) begin
      plue_req = 1'b1; plue_op = LUE_WRITE;        // remember this new fragmented packet
    end else if (op_id) begin
      plue_req = 1'b1; plue_op = instr.cfg[1:0];
    end
    slue_req = op_pa;
    slue_op  = instr.cfg[1:0];
  end

  plue #(.M(M), .W(W)) u_plue (
    .clk, .rst_n, .req(plue_req), .op(plue_op),
    .key((op_np || op_id) ? dbus0[15:0] : ipid),
    .wptr((st == S_LOOK) ? buf_addr : pkt_buf),
    .upd_wp(plue_wr_d),
    .done(plue_done), .hit(plue_hit), .ptr(plue_ptr), .full(plue_full)
  );

  slue #(.N(N), .W(W), .SEARCH_CYCLES(SLUE_CYCLES)) u_slue (
    .clk, .rst_n, .req(slue_req), .op(slue_op), .key,
    .wild(dbus0[W+5:W]), .wptr(dbus0[W-1:0]), .upd_wp(slue_wr_d),
    .done(slue_done), .hit(slue_hit), .ptr(slue_ptr), .full(slue_full)
  );

  mem_buf_gen #(.W(W)) u_bufgen (
    .clk, .rst_n,
    .set(op_buf), .set_cls(instr.cfg[1:0]), .set_base(dbus1_in[W-1:0]),
    .set_stride(dbus1_in[31:20]),
    .cls(2'd0), .addr(buf_addr),
    .advance(st == S_UPDATE && new_buf), .adv_cls(2'd0)
  );

  // ---------------- control procedure ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_WAIT; pcfg <= '0; key <= '0; ipid <= '0;
      frag_look <= 1'b0; slue_got <= 1'b0; slue_hit_q <= 1'b0; slue_pend <= 1'b0;
      conn_ptr <= '0; pkt_buf <= '0; new_buf <= 1'b0; plue_wr <= 1'b0; slue_wr <= 1'b0;
      plue_wr_d <= 1'b0; slue_wr_d <= 1'b0;
      packet_ready <= 1'b0; discard <= 1'b0; frag_old <= 1'b0; uc_new_packet <= 1'b0;
      buf_set <= 1'b0;
    end else begin
      uc_new_packet <= 1'b0;
      plue_wr_d <= 1'b0;
      slue_wr_d <= 1'b0;
      if (plue_req && lue_op_e'(plue_op) == LUE_WRITE) plue_wr <= 1'b1;
      if (slue_req && lue_op_e'(slue_op) == LUE_WRITE) slue_wr <= 1'b1;

      // key registers
      if (op_np) begin
        key       <= '0;
        key.ptype <= {2'b00, icfg.ptype};
      end else if (op_ld) begin
        unique case (instr.cfg[2:0])
          3'd0: {key.sport, key.dport} <= dbus0;
          3'd1: key.addr[127:96] <= dbus0;
          3'd2: key.addr[95:64]  <= dbus0;
          3'd3: key.addr[63:32]  <= dbus0;
          3'd4: key.addr[31:0]   <= dbus0;
          default: key.ptype     <= dbus0[7:0];
        endcase
      end

      // SLUE results arriving at any time during the packet
      if (op_pa && lue_op_e'(instr.cfg[1:0]) == LUE_READ) slue_pend <= 1'b1;
      if (slue_done && slue_pend) begin
        slue_got   <= 1'b1;
        slue_hit_q <= slue_hit;
        slue_pend  <= 1'b0;
        if (slue_hit) conn_ptr <= slue_ptr;
      end

      unique case (st)
        S_WAIT: if (op_np) begin
          pcfg      <= icfg;
          ipid      <= dbus0[15:0];
          frag_look <= icfg.fragmented;
          slue_got  <= 1'b0; slue_pend <= 1'b0;
          discard   <= 1'b0; frag_old <= 1'b0; new_buf <= 1'b0;
          plue_wr   <= 1'b0; slue_wr <= 1'b0;
          buf_set   <= 1'b0;
          st        <= S_LOOK;
        end
        S_LOOK: begin
          if (!frag_look && !buf_set) begin
            pkt_buf <= buf_addr; new_buf <= 1'b1; buf_set <= 1'b1;
          end
          if (frag_look && plue_done) begin
            frag_look <= 1'b0;
            buf_set   <= 1'b1;
            frag_old  <= plue_hit;
            if (plue_hit) pkt_buf <= plue_ptr;
            else begin
              pkt_buf <= buf_addr; new_buf <= 1'b1;
            end
          end
          if (buf_set || (frag_look && plue_done)) begin
            if (!pcfg.has_l4) begin
              packet_ready <= 1'b1; st <= S_READY;
            end else st <= S_CONN;
          end
        end
        S_CONN: begin
          if (slue_got || (slue_done && slue_pend)) begin
            if (slue_got ? slue_hit_q : slue_hit) st <= S_WR;
            else begin
              discard <= 1'b1; packet_ready <= 1'b1; st <= S_READY;
            end
          end
        end
        S_WR: begin
          packet_ready <= 1'b1; st <= S_READY;
        end
        S_READY: if (op_rel) begin
          packet_ready <= 1'b0; st <= S_UPDATE;
        end
        S_UPDATE: begin
          uc_new_packet <= 1'b1;
          plue_wr_d <= plue_wr; slue_wr_d <= slue_wr;
          plue_wr <= 1'b0; slue_wr <= 1'b0;
          st <= S_WAIT;
        end
        default: st <= S_WAIT;
      endcase

      // CAM writes made outside a packet update their write index at once
      if (st == S_WAIT && !op_np) begin
        if (plue_wr) begin plue_wr_d <= 1'b1; plue_wr <= 1'b0; end
        if (slue_wr) begin slue_wr_d <= 1'b1; slue_wr <= 1'b0; end
      end
    end
  end

  assign busy      = st != S_WAIT;
  assign dbus1_out = {{(32 - W){1'b0}}, conn_ptr};

  // ---------------- memory access selector ----------------
  always_comb begin
    uc_gnt   = 1'b0;
    cm_we    = 1'b0;
    cm_addr  = pkt_buf;
    cm_wdata = dbus1_out;
    if (st == S_WR) begin
      cm_we = 1'b1;                      // connection pointer into the packet buffer
    end else if (st == S_READY && ppp_req) begin
      cm_we    = ppp_we;
      cm_addr  = pkt_buf + W'(ppp_off);
      cm_wdata = ppp_wdata;
    end else if ((st == S_WAIT || st == S_UPDATE) && uc_req) begin
      uc_gnt   = 1'b1;
      cm_we    = uc_we;
      cm_addr  = uc_addr;
      cm_wdata = uc_wdata;
    end
  end

`ifndef SYNTHESIS
  a_one_packet: assert property (@(posedge clk) disable iff (!rst_n)
      (instr_valid && instr.op == CI_NEW_PKT) |-> st == S_WAIT)
    else $error("cmaa: NEW_PKT while a packet is in progress");
`endif
endmodule
