// slue: secondary look-up engine of the CMAA, the connection classifier. Its key is
// an internal packet type (8 bits), source and destination port (16 bits each) and a
// 128-bit address field. It is built from two simplified TCAMs of three CAMs each:
// {type, source port, destination port} and {address bits 127:64, 63:32, 31:0}. Each
// connection entry stores a wildcard bit per CAM, so a field can be ignored for that
// connection (a listening port, IPv4 with or without the source, IPv6 unicast or
// multicast, 64-bit IPv6 prefixes). An entry matches when all six CAMs match; the
// match vector selects the connection pointer (W bits) in the result memory.
// Operations: LUE_READ searches key; LUE_WRITE stores key, wild[5:0] and wptr at the
// write index; LUE_REMOVE searches and invalidates the matching entry. The write
// index moves to the lowest free entry on upd_wp and after a removal; a write while
// the table is full is ignored.
// Timing: a search request at cycle t gives done/hit/ptr in cycle t+SEARCH_CYCLES
// (compare registered after the first cycle, then encode, then delay stages that stand
// for the multi-cycle CAM path). Six CAMs, N, W and the three-cycle search follow the
// architecture; how the address field is cut into CAMs is this design's choice, and
// the encoder assumes at most one match, as the internal type is meant to ensure.
module slue
  import ppp_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned W = 20,
  parameter int unsigned SEARCH_CYCLES = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [1:0]    op,
  input  slue_key_t     key,
  input  logic [5:0]    wild,    // per CAM: 0 type, 1 sport, 2 dport, 3 adr[127:64], 4 adr[63:32], 5 adr[31:0]
  input  logic [W-1:0]  wptr,
  input  logic          upd_wp,
  output logic          done,
  output logic          hit,
  output logic [W-1:0]  ptr,
  output logic          full
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned DL = (SEARCH_CYCLES < 2) ? 1 : SEARCH_CYCLES - 1;

  logic [N-1:0] h0, h1, h2, h3, h4, h5, hitv, s1_hit;
  logic [N-1:0] valid, inv;
  logic [N-1:0] v1, v2, v3, v4, v5;
  logic [IW-1:0] wp, free_idx, enc;
  logic         f1, f2, f3, f4, f5;
  logic [IW-1:0] fi1, fi2, fi3, fi4, fi5;
  logic [W-1:0] rmem [N];
  logic         refresh;
  logic         we, s1_v;
  logic [1:0]   s1_op;
  // delay line after encoding: {valid, hit, ptr}
  logic [DL-1:0]        dv, dh;
  logic [W-1:0]         dp [DL];

  assign we = req && lue_op_e'(op) == LUE_WRITE && !full;   // a full table ignores writes

  cam #(.ENTRIES(N), .KEY_W(8))  u_type (.clk, .rst_n, .key(key.ptype), .hit(h0), .we, .waddr(wp),
    .wkey(key.ptype), .wwild(wild[0]), .inv, .valid,    .free_idx,      .full);
  cam #(.ENTRIES(N), .KEY_W(16)) u_sp   (.clk, .rst_n, .key(key.sport), .hit(h1), .we, .waddr(wp),
    .wkey(key.sport), .wwild(wild[1]), .inv, .valid(v1), .free_idx(fi1), .full(f1));
  cam #(.ENTRIES(N), .KEY_W(16)) u_dp   (.clk, .rst_n, .key(key.dport), .hit(h2), .we, .waddr(wp),
    .wkey(key.dport), .wwild(wild[2]), .inv, .valid(v2), .free_idx(fi2), .full(f2));
  cam #(.ENTRIES(N), .KEY_W(64)) u_a0   (.clk, .rst_n, .key(key.addr[127:64]), .hit(h3), .we, .waddr(wp),
    .wkey(key.addr[127:64]), .wwild(wild[3]), .inv, .valid(v3), .free_idx(fi3), .full(f3));
  cam #(.ENTRIES(N), .KEY_W(32)) u_a1   (.clk, .rst_n, .key(key.addr[63:32]), .hit(h4), .we, .waddr(wp),
    .wkey(key.addr[63:32]), .wwild(wild[4]), .inv, .valid(v4), .free_idx(fi4), .full(f4));
  cam #(.ENTRIES(N), .KEY_W(32)) u_a2   (.clk, .rst_n, .key(key.addr[31:0]), .hit(h5), .we, .waddr(wp),
    .wkey(key.addr[31:0]), .wwild(wild[5]), .inv, .valid(v5), .free_idx(fi5), .full(f5));

  assign hitv = h0 & h1 & h2 & h3 & h4 & h5;

  always_ff @(posedge clk) if (we) rmem[wp] <= wptr;

  always_comb begin
    enc = '0;
    for (int i = 0; i < N; i++) if (s1_hit[i]) enc = enc | IW'(i);
  end

  assign inv = (s1_v && lue_op_e'(s1_op) == LUE_REMOVE) ? s1_hit : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_op <= '0; s1_hit <= '0; wp <= '0; refresh <= 1'b0; dv <= '0; dh <= '0;
      for (int i = 0; i < DL; i++) dp[i] <= '0;
    end else begin
      s1_v   <= req && !we;
      s1_op  <= op;
      s1_hit <= hitv;
      dv[0]  <= s1_v;
      dh[0]  <= s1_v && (s1_hit != '0);
      dp[0]  <= rmem[enc];
      for (int i = 1; i < DL; i++) begin
        dv[i] <= dv[i-1]; dh[i] <= dh[i-1]; dp[i] <= dp[i-1];
      end
      // move the write index to a free entry after a write, and after a removal
      refresh <= (inv != '0);
      if (upd_wp || refresh) wp <= free_idx;
    end
  end

  assign done = dv[DL-1];
  assign hit  = dh[DL-1];
  assign ptr  = dp[DL-1];
endmodule
