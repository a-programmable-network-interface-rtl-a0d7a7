// checksum_fp: Internet checksum functional page. A pair of 16-bit one's-complement
// adders folds both half-words of every enabled 32-bit stream word into the
// accumulator in one clock, so it keeps pace with the chain. Missing bytes of a short
// last word count as zero. ld loads the accumulator with a value (zero, a pseudo-
// header sum, or a partial checksum stored for an earlier fragment), add_op adds a
// value (a half-word the word-wise accumulation cannot cover); start clears it.
// ok is set when the accumulator is 0xFFFF, i.e. the covered data including the
// transmitted checksum sums to negative zero. sum is the running checksum, used to
// save a partial result between fragments. Timing: results follow one cycle after
// the last word. The two-adder structure follows the architecture; the load/clear
// controls are this design's choice.
module checksum_fp (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        ld,
  input  logic        add_op,
  input  logic [15:0] ld_val,
  input  logic        en,
  input  logic        din_valid,
  input  logic [31:0] din,
  input  logic [2:0]  din_bytes,
  output logic [15:0] sum,
  output logic        ok
);
  function automatic logic [15:0] add1c(logic [15:0] a, logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  logic [31:0] d;
  always_comb begin
    unique case (din_bytes)
      3'd1:    d = {din[31:24], 24'd0};
      3'd2:    d = {din[31:16], 16'd0};
      3'd3:    d = {din[31:8], 8'd0};
      default: d = din;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else if (start) sum <= '0;
    else if (ld) sum <= ld_val;
    else if (add_op) sum <= add1c(sum, ld_val);
    else if (en && din_valid) sum <= add1c(add1c(sum, d[31:16]), d[15:0]);
  end

  assign ok = (sum == 16'hFFFF);
endmodule
