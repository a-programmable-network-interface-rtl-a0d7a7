// mii_par_fp: MII parallelization functional page. An MII PHY delivers 4-bit
// nibbles, least significant nibble of each byte first. This FP pairs the nibbles
// into bytes and hands them, one byte every second nibble, to the same preamble
// stripping and word packing logic the GMII port uses (gmii_rx), so the input
// buffer chain sees aligned 32-bit words whichever interface is used.
// The FP exists only when the processor is built for an MII port. Interface: MII
// rx_dv/rxd in (nib_en marks the clocks that carry a nibble), strm_word_t words with out_valid out; a word appears a few nibble
// times after its last nibble.
module mii_par_fp
  import ppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_dv,
  input  logic        nib_en,      // clock carries a nibble (tie high for one per clock)
  input  logic [3:0]  rxd,
  output logic        out_valid,
  output strm_word_t  out_word
);
  logic       have_lo;
  logic [3:0] lo;
  logic       byte_stb;
  logic [7:0] byte_q;
  logic       dv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_lo <= 1'b0; lo <= '0; byte_stb <= 1'b0; byte_q <= '0; dv_q <= 1'b0;
    end else begin
      byte_stb <= 1'b0;
      dv_q     <= rx_dv;
      if (!rx_dv) have_lo <= 1'b0;
      else if (!nib_en) begin
        have_lo <= have_lo;
      end else if (!have_lo) begin
        lo <= rxd; have_lo <= 1'b1;
      end else begin
        byte_q <= {rxd, lo}; byte_stb <= 1'b1; have_lo <= 1'b0;
      end
    end
  end

  gmii_rx u_pack (
    .clk, .rst_n,
    .rx_dv   (dv_q),
    .byte_en (byte_stb),
    .rxd     (byte_q),
    .out_valid, .out_word
  );
endmodule
