// plue: primary look-up engine of the CMAA. It remembers the IP identification
// numbers of packets of which fragments have already arrived: a 16-bit CAM of M
// entries plus a result memory of M control-memory addresses (W bits), the address
// of the packet buffer holding that packet's reassembly variables.
// Operations (req with op): LUE_READ searches key; LUE_WRITE stores key with wptr at
// the current write index; LUE_REMOVE searches key and invalidates the matching entry.
// Timing: the key is taken into the input register at the request cycle, the search
// then takes two cycles (compare, then encode and read the result memory), so done,
// hit and ptr appear three cycles after req. A write takes effect at the next edge.
// upd_wp moves the write index to the lowest free entry (done by the CMAA in its
// update state, only after a write); a removal refreshes it as well, so a freed entry
// is reused. A write while the table is full is ignored (full stays set). Sizes and the two-cycle search follow the
// architecture; the encoder assumes at most one match (no priority logic).
module plue #(
  parameter int unsigned M = 16,
  parameter int unsigned W = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req,
  input  logic [1:0]           op,
  input  logic [15:0]          key,
  input  logic [W-1:0]         wptr,
  input  logic                 upd_wp,
  output logic                 done,
  output logic                 hit,
  output logic [W-1:0]         ptr,
  output logic                 full
);
  import ppp_pkg::*;
  localparam int unsigned IW = $clog2(M);

  logic [15:0]  key_q;
  logic         s1_v, s2_v;
  logic [1:0]   s1_op, s2_op;
  logic [M-1:0] hitv, s2_hit;
  logic [M-1:0] valid, inv;
  logic [IW-1:0] wp, free_idx, enc;
  logic [W-1:0] rmem [M];
  logic         we;
  logic         refresh;

  assign we = req && lue_op_e'(op) == LUE_WRITE && !full;   // a full table ignores writes

  cam #(.ENTRIES(M), .KEY_W(16)) u_cam (
    .clk, .rst_n, .key(key_q), .hit(hitv),
    .we, .waddr(wp), .wkey(key), .wwild(1'b0),
    .inv, .valid, .free_idx, .full
  );

  always_ff @(posedge clk) if (we) rmem[wp] <= wptr;

  // OR encoder: a single match is guaranteed by construction
  always_comb begin
    enc = '0;
    for (int i = 0; i < M; i++) if (s2_hit[i]) enc = enc | IW'(i);
  end

  assign inv = (s2_v && lue_op_e'(s2_op) == LUE_REMOVE) ? s2_hit : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0; s1_v <= 1'b0; s1_op <= '0; s2_v <= 1'b0; s2_op <= '0; s2_hit <= '0;
      done <= 1'b0; hit <= 1'b0; ptr <= '0; wp <= '0; refresh <= 1'b0;
    end else begin
      // stage 0: input register
      s1_v  <= req && !we;
      s1_op <= op;
      if (req) key_q <= key;
      // stage 1: compare
      s2_v   <= s1_v;
      s2_op  <= s1_op;
      s2_hit <= hitv;
      // stage 2: encode and read result memory
      done <= s2_v;
      hit  <= s2_v && (s2_hit != '0);
      ptr  <= rmem[enc];
      // move the write index to a free entry after a write, and after a removal
      refresh <= (inv != '0);
      if (upd_wp || refresh) wp <= free_idx;
    end
  end
endmodule
