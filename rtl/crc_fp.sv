// crc_fp: configurable CRC functional page built from radix-16 steps. The CRC
// register is a linear shift register whose feedback taps are switched by the
// polynomial register, so any generator of degree 16, 24 or 32 can be loaded.
// Shorter polynomials are kept left-aligned in the 32-bit register; the unused low
// bits then stay zero, which plays the role of shutting that part of the circuit
// down. One radix-16 step consumes four input bits: each new register bit depends
// on the bit four places below, the top four register bits, the polynomial and the
// inputs. STEPS radix-16 steps are chained per clock: STEPS=1 is the four-bit engine;
// the processor instantiates STEPS=8 to keep up with its 32-bit chain.
// Bits enter most significant first, or, with lsb_first set, least significant bit
// of every byte first (Ethernet order; with STEPS=1 the nibble is taken bit 0 first).
// Configuration: addr 0 polynomial (without the x^n term, right-aligned), 1 {lsb_first
// [2], length code [1:0]: 0=16, 1=24, 2=32}, 2 initial value, 3 expected remainder.
// start loads the initial value; while en is high every din_valid cycle consumes
// din_nibs nibbles from the top of din. crc/crc_ok follow one cycle later.
module crc_fp #(
  parameter int unsigned STEPS = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [1:0]             cfg_addr,
  input  logic [31:0]            cfg_wdata,
  input  logic                   start,
  input  logic                   en,
  input  logic                   din_valid,
  input  logic [4*STEPS-1:0]     din,
  input  logic [$clog2(STEPS+1)-1:0] din_nibs,
  output logic [31:0]            crc,
  output logic                   crc_ok
);
  logic [31:0] poly_q, init_q, res_q, c_q, c_nxt, poly_al;
  logic [1:0]  len_q;
  logic        lsbf_q;
  logic [5:0]  shamt;
  logic [4*STEPS-1:0] bits;   // din in arrival order, first bit at the top

  always_comb begin
    unique case (len_q)
      2'd0:    shamt = 6'd16;
      2'd1:    shamt = 6'd8;
      default: shamt = 6'd0;
    endcase
    poly_al = poly_q << shamt;
  end

  // reorder the input into arrival order
  always_comb begin
    bits = din;
    if (lsbf_q) begin
      if (STEPS == 1) begin
        for (int j = 0; j < 4; j++) bits[3-j] = din[j];
      end else begin
        for (int b = 0; b < STEPS / 2; b++)
          for (int j = 0; j < 8; j++)
            bits[4*STEPS-1-8*b-j] = din[4*STEPS-8-8*b+j];
      end
    end
  end

  // radix-16 steps: four bit updates each, only the first din_nibs steps applied
  logic [31:0] c;
  logic        fb;
  always_comb begin
    c  = c_q;
    fb = 1'b0;
    for (int s = 0; s < STEPS; s++) begin
      if (s < int'(din_nibs)) begin
        for (int k = 0; k < 4; k++) begin
          fb = c[31] ^ bits[4*STEPS-1-4*s-k];
          c  = {c[30:0], 1'b0} ^ (poly_al & {32{fb}});
        end
      end
    end
    c_nxt = c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poly_q <= 32'h04C11DB7; len_q <= 2'd2; lsbf_q <= 1'b1;
      init_q <= '1; res_q <= 32'hC704DD7B; c_q <= '0;
    end else begin
      if (cfg_we) begin
        unique case (cfg_addr)
          2'd0: poly_q <= cfg_wdata;
          2'd1: begin len_q <= cfg_wdata[1:0] == 2'd3 ? 2'd2 : cfg_wdata[1:0]; lsbf_q <= cfg_wdata[2]; end
          2'd2: init_q <= cfg_wdata;
          default: res_q <= cfg_wdata;
        endcase
      end
      if (start)                 c_q <= init_q << shamt;
      else if (en && din_valid)  c_q <= c_nxt;
    end
  end

  assign crc    = c_q >> shamt;
  assign crc_ok = (crc == res_q);
endmodule
