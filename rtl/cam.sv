// cam: binary content-addressable memory with ENTRIES words of KEY_W bits. Every
// entry has a valid bit and a wildcard bit; a wildcard entry matches any key, which
// is the "simplified TCAM" idea: instead of a don't-care per bit there is one for
// the whole field. The match vector is combinational from the key and the stored
// entries (the look-up engines register it). One entry is written per cycle at
// waddr; inv clears the valid bits of any set of entries. free_idx/full report the
// lowest unused entry for the next write. Storage organisation is this design's own.
module cam #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned KEY_W   = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [KEY_W-1:0]           key,
  output logic [ENTRIES-1:0]         hit,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  logic [KEY_W-1:0]           wkey,
  input  logic                       wwild,
  input  logic [ENTRIES-1:0]         inv,
  output logic [ENTRIES-1:0]         valid,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  output logic                       full
);
  logic [KEY_W-1:0] mem  [ENTRIES];
  logic [ENTRIES-1:0] wild;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0; wild <= '0;
    end else begin
      valid <= valid & ~inv;
      if (we) begin
        valid[waddr] <= 1'b1;
        wild[waddr]  <= wwild;
      end
    end
  end

  always_ff @(posedge clk) if (we) mem[waddr] <= wkey;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      hit[i] = valid[i] && (wild[i] || mem[i] == key);
  end

  always_comb begin
    free_idx = '0;
    full     = 1'b1;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) begin
        free_idx = ($clog2(ENTRIES))'(i);
        full     = 1'b0;
      end
  end
endmodule
