// control_memory: the shared control memory of the protocol processor. It stores the
// inter-packet variables (packet buffers for reassembly, connection buffers) and the
// payload of control protocols handled by the micro controller. It is a plain
// single-port RAM of 2**AW words of 32 bits with a synchronous read: rdata shows the
// word addressed in the previous cycle. Access arbitration (the accelerator before
// the micro controller) is done in front of it, in the CMAA. Word width and the
// single port are this design's choice; AW is the control-memory address width W.
module control_memory #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
