// mem_buf_gen: memory buffer generator of the CMAA. It hands out control-memory
// addresses for new buffers. There is one allocation pointer and one stride per
// buffer class (class 0 packet buffers for reassembly, class 1 connection buffers,
// class 2 control-protocol payload, class 3 spare), matching the buffer areas of the
// control memory. The micro controller places the areas: set writes a class's next
// address and stride. addr(cls) is always the next buffer of that class; advance
// moves that class on by its stride (the CMAA does this in its update state, once the
// buffer has really been used). Interface and class split are this design's choice;
// the architecture says only that the unit generates buffer addresses under control
// of the micro controller. Timing: set/advance take effect at the next edge.
module mem_buf_gen #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         set,
  input  logic [1:0]   set_cls,
  input  logic [W-1:0] set_base,
  input  logic [11:0]  set_stride,
  input  logic [1:0]   cls,
  output logic [W-1:0] addr,
  input  logic         advance,
  input  logic [1:0]   adv_cls
);
  logic [W-1:0] nxt    [4];
  logic [11:0]  stride [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) begin
        nxt[c]    <= W'(c) << (W - 2);   // four equal areas by default
        stride[c] <= 12'd16;
      end
    end else begin
      if (advance) nxt[adv_cls] <= nxt[adv_cls] + W'(stride[adv_cls]);
      if (set) begin
        nxt[set_cls]    <= set_base;
        stride[set_cls] <= set_stride;
      end
    end
  end

  assign addr = nxt[cls];
endmodule
