// xac_fp: extract-and-compare functional page. On a start strobe it captures the
// 32-bit word presented by the stream (the extracted vector) and compares it with a
// reference register under a 32-bit mask. The comparator is four byte slices; their
// results combine into four 8-bit, two 16-bit or one 32-bit comparison. The mode
// register chooses which of these drives the main match flag (mode 8: byte sel,
// mode 16: half-word sel[0], mode 32: whole word). A cleared mask bit makes that
// bit compare equal. The extracted vector is also a result output, read by the
// controller and the CMAA (addresses, ports, lengths, identification numbers).
// Configuration (micro controller): addr 0 reference value, 1 mask, 2 {sel, mode}.
// Timing: flags and the vector are valid from the cycle after start and hold until
// the next start. Slices and modes follow the architecture; the flag set and the
// register map are this design's choice.
module xac_fp (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        start,
  input  logic [31:0] word,
  output logic [31:0] vec,       // extracted vector
  output logic [3:0]  byte_eq,
  output logic [1:0]  half_eq,   // [1] = bits 31:16
  output logic        word_eq,
  output logic        match
);
  typedef enum logic [1:0] {M8 = 2'd0, M16 = 2'd1, M32 = 2'd2} xmode_e;

  logic [31:0] ref_q, mask_q;
  xmode_e      mode_q;
  logic [1:0]  sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= '0; mask_q <= '1; mode_q <= M32; sel_q <= '0; vec <= '0;
    end else begin
      if (cfg_we) begin
        unique case (cfg_addr)
          2'd0: ref_q  <= cfg_wdata;
          2'd1: mask_q <= cfg_wdata;
          2'd2: begin
            mode_q <= xmode_e'(cfg_wdata[1:0] == 2'd3 ? 2'd2 : cfg_wdata[1:0]);
            sel_q  <= cfg_wdata[5:4];
          end
          default: ;
        endcase
      end
      if (start) vec <= word;
    end
  end

  // four byte-comparing slices
  always_comb begin
    for (int s = 0; s < 4; s++)
      byte_eq[s] = ((vec[8*s +: 8] ^ ref_q[8*s +: 8]) & mask_q[8*s +: 8]) == 8'h00;
    half_eq[0] = byte_eq[0] & byte_eq[1];
    half_eq[1] = byte_eq[2] & byte_eq[3];
    word_eq    = &byte_eq;
    unique case (mode_q)
      M8:      match = byte_eq[sel_q];
      M16:     match = half_eq[sel_q[0]];
      default: match = word_eq;
    endcase
  end
endmodule
