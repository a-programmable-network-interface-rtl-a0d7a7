// gmii_rx: receive side of the network interface. It takes the byte stream of a
// GMII port (rx_dv/rxd, one byte per enabled clock), waits for the preamble and the
// start-of-frame delimiter 0xD5, and packs the frame bytes into 32-bit words for the
// input buffer chain, first byte in bits [31:24]. Every word carries its byte count,
// and the first and last word of a frame are marked (sof/eof).
// Timing: a full word is held until the next byte arrives (or rx_dv falls), so that
// the last word of a frame can carry eof; a word therefore appears one to four byte
// times after its last byte. byte_en lets a slower source (the MII nibble packer)
// feed it; for GMII it is tied high. The architecture only says that the interface
// delivers 32-bit words to the chain; framing details are this design's choice.
module gmii_rx
  import ppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_dv,
  input  logic        byte_en,
  input  logic [7:0]  rxd,
  output logic        out_valid,
  output strm_word_t  out_word
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA} st_e;
  st_e         st;
  logic [31:0] acc;        // word being assembled
  logic [2:0]  cnt;        // bytes in acc
  logic        pend;       // a full word waits in pword
  logic [31:0] pword;
  logic        first;      // next emitted word is the first of the frame

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; acc <= '0; cnt <= '0; pend <= 1'b0; pword <= '0; first <= 1'b0;
      out_valid <= 1'b0; out_word <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (rx_dv && byte_en && rxd == 8'h55) st <= S_PRE;
        S_PRE: begin
          if (!rx_dv) st <= S_IDLE;
          else if (byte_en) begin
            if (rxd == 8'hD5) begin
              st <= S_DATA; cnt <= '0; pend <= 1'b0; first <= 1'b1;
            end else if (rxd != 8'h55) st <= S_IDLE;
          end
        end
        S_DATA: begin
          if (!rx_dv) begin
            // end of frame: emit what is left, marked as last
            st <= S_IDLE;
            if (cnt != 0) begin
              out_valid <= 1'b1;
              out_word  <= '{sof: first, eof: 1'b1, nbytes: cnt,
                             data: acc << (8 * (4 - cnt))};
            end else if (pend) begin
              out_valid <= 1'b1;
              out_word  <= '{sof: first, eof: 1'b1, nbytes: 3'd4, data: pword};
            end
            pend <= 1'b0; cnt <= '0;
          end else if (byte_en) begin
            if (pend && cnt == 0) begin
              out_valid <= 1'b1;
              out_word  <= '{sof: first, eof: 1'b0, nbytes: 3'd4, data: pword};
              first <= 1'b0;
              pend  <= 1'b0;
            end
            if (cnt == 3'd3) begin
              pword <= {acc[23:0], rxd};
              pend  <= 1'b1;
              cnt   <= '0;
            end else begin
              acc <= {acc[23:0], rxd};
              cnt <= cnt + 3'd1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
