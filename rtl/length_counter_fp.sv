// length_counter_fp: length counting functional page. It holds an adder and two
// registers: an accumulator and a stop value. While enabled it adds the byte count
// of every stream word (or 1 per word, if configured to count words); add_op adds an
// explicit operand instead, e.g. the length of a new fragment to the length received
// so far. eq is raised when accumulator and stop value are equal, zero when the
// accumulator is zero; the controller schedules its actions on these flags.
// Configuration: addr 0 {count_words}. Loads: ld_acc / ld_stop with ld_val.
// Timing: flags reflect the registers, one cycle after the update.
module length_counter_fp (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [31:0] cfg_wdata,
  input  logic        start,      // clear the accumulator
  input  logic        ld_acc,
  input  logic        ld_stop,
  input  logic [15:0] ld_val,
  input  logic        add_op,
  input  logic        en,
  input  logic        din_valid,
  input  logic [2:0]  din_bytes,
  output logic [15:0] acc,
  output logic [15:0] stop,
  output logic        eq,
  output logic        zero
);
  logic count_words;
  logic [15:0] inc;

  always_comb begin
    if (add_op)           inc = ld_val;
    else if (count_words) inc = 16'd1;
    else                  inc = {13'd0, din_bytes};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; stop <= '0; count_words <= 1'b0;
    end else begin
      if (cfg_we) count_words <= cfg_wdata[0];
      if (ld_stop) stop <= ld_val;
      if (start) acc <= '0;
      else if (ld_acc) acc <= ld_val;
      else if (add_op || (en && din_valid)) acc <= acc + inc;
    end
  end

  assign eq   = (acc == stop);
  assign zero = (acc == '0);
endmodule
