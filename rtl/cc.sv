// cc: counter and controller (C&C) of the protocol processor. A small programmable
// controller that schedules the functional pages (FPs) as a frame streams through
// the input chain, reads their result flags, steers the CMAA and decides whether the
// packet is accepted or discarded. Its datapath is one ALU and a register file of
// eight 32-bit registers; control is a program counter, a flag decoder, a four-way
// jump (one of four jump-target registers is chosen by two flags in a single cycle,
// used to branch on the protocol type) and two counters: a word counter that counts
// the words of the current frame, and a down counter.
// Program: 32-bit instructions (ppp_pkg::cc_op_e) in a PDEPTH-word program memory
// written by the micro controller (prog_we). After reset the controller idles until
// run is set, then executes from address 0, one instruction per clock. OP_END waits
// for the first word of the next frame and continues with the next instruction, so
// a program is a loop: prepare the FPs, END, then handle the frame.
// FP control: fp_en are level enables (OP_FPON/OP_FPOFF, effective in the cycle of the
// instruction), fp_start are one-cycle strobes (OP_FPSTART, or the start mask of
// OP_WAITW, fired in the cycle the awaited word reaches chain stage 0), fp_ld/
// fp_ld_sel/fp_operand load FP registers from a C&C register. OP_MEMW/OP_MEMR reach the
// current packet buffer in the control memory through the CMAA (mem_* port); MEMR data
// lands in the register at the end of the next cycle (one load delay slot).
// OP_DISCARD stops all FPs at once. OP_WAITC spends (loaded count + 1) cycles.
// Timing: one instruction per clock. With one word every fourth clock (GMII byte
// clock) there are three instruction slots per word after a WAITW. The set of units, the four-way
// jump, the counters and the flag/start interface follow the architecture; the
// instruction set, widths and program memory size are this design's own.
module cc
  import ppp_pkg::*;
#(
  parameter int unsigned PDEPTH = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          prog_we,
  input  logic [7:0]    prog_addr,
  input  logic [31:0]   prog_wdata,
  input  logic          push,        // a word enters chain stage 0
  input  logic          push_sof,
  input  logic          push_eof,
  input  logic [NUM_FLAGS-1:0] flags_in,   // FP and CMAA flags (FL_EOF/ALU_Z/ONE are filled in here)
  input  logic [31:0]   res [16],    // FP results for OP_RDFP and dbus0
  output logic [NUM_FP-1:0] fp_en,
  output logic [NUM_FP-1:0] fp_start,
  output logic [NUM_FP-1:0] fp_ld,
  output logic [1:0]    fp_ld_sel,
  output logic [31:0]   fp_operand,
  output logic          cmaa_valid,
  output cmaa_instr_t   cmaa_instr,
  output logic [31:0]   dbus0,
  output logic          accept,
  output logic          accept_dest, // 0 host memory, 1 control memory
  output logic          discard,
  output logic          waiting,
  output logic          mem_req,     // access to the current packet buffer via the CMAA
  output logic          mem_we,
  output logic [7:0]    mem_off,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata,   // read data, one cycle after the request     // at OP_END, waiting for a frame
  output logic [15:0]   wcnt,
  output logic [7:0]    pc
);
  logic [31:0] prog [PDEPTH];
  logic [31:0] ir;
  logic [31:0] r [8];
  logic [7:0]  jt [4];
  logic [15:0] dcnt;
  logic        started, eof_seen, alu_z;
  logic [NUM_FP-1:0] fp_en_q;
  logic [NUM_FLAGS-1:0] flags;

  cc_op_e      op;
  logic [2:0]  rd, ra, rb;
  logic [15:0] imm;
  logic        stall;
  logic [7:0]  pc_nxt;
  logic [31:0] alu_y;
  logic        rd_pend;
  logic [2:0]  rd_dst;

  always_ff @(posedge clk) if (prog_we) prog[prog_addr[$clog2(PDEPTH)-1:0]] <= prog_wdata;

  assign ir  = prog[pc[$clog2(PDEPTH)-1:0]];
  assign op  = cc_op_e'(ir[31:27]);
  assign rd  = ir[26:24];
  assign ra  = ir[23:21];
  assign rb  = ir[20:18];
  assign imm = ir[15:0];

  // flag decoder
  always_comb begin
    flags = flags_in;
    flags[FL_EOF]   = eof_seen;
    flags[FL_ALU_Z] = alu_z;
    flags[FL_ONE]   = 1'b1;
  end

  // ALU
  always_comb begin
    unique case (alu_fn_e'(imm[2:0]))
      ALU_ADD:   alu_y = r[ra] + r[rb];
      ALU_SUB:   alu_y = r[ra] - r[rb];
      ALU_AND:   alu_y = r[ra] & r[rb];
      ALU_OR:    alu_y = r[ra] | r[rb];
      ALU_XOR:   alu_y = r[ra] ^ r[rb];
      ALU_SHR16: alu_y = r[ra] >> 16;
      ALU_LO16:  alu_y = {16'd0, r[ra][15:0]};
      default:   alu_y = r[ra] << 16;
    endcase
  end

  // decode: stall, next pc and the control strobes of this cycle
  always_comb begin
    stall      = 1'b0;
    pc_nxt     = pc + 8'd1;
    fp_start   = '0;
    fp_ld      = '0;
    fp_ld_sel  = imm[1:0];
    fp_operand = r[ra];
    fp_en      = fp_en_q;
    cmaa_valid = 1'b0;
    cmaa_instr = '{op: cmaa_op_e'(imm[14:12]), cfg: imm[7:0]};
    dbus0      = (imm[11:8] == 4'(SRC_REG0)) ? r[ra] : res[imm[11:8]];
    accept     = 1'b0;
    discard    = 1'b0;
    waiting    = 1'b0;
    mem_req    = 1'b0;
    mem_we     = 1'b0;
    mem_off    = imm[7:0];
    mem_wdata  = r[ra];
    if (!started) begin
      stall = 1'b1;
    end else begin
      unique case (op)
        OP_JMP:   pc_nxt = imm[7:0];
        OP_BRF:   if (flags[imm[15:12]] == imm[11]) pc_nxt = imm[7:0];
        OP_MJMP:  pc_nxt = jt[{flags[imm[7:4]], flags[imm[3:0]]}];
        OP_WAITW: begin
          if (wcnt < {8'd0, imm[7:0]}) stall = 1'b1;
          else fp_start = imm[15:8];
        end
        OP_WAITF: stall = (flags[imm[15:12]] != imm[11]);
        OP_WAITC: stall = (dcnt != 16'd0);
        OP_FPON:  fp_en = fp_en_q | imm[7:0];
        OP_FPOFF: fp_en = fp_en_q & ~imm[7:0];
        OP_FPSTART: fp_start = imm[7:0];
        OP_FPLD:  fp_ld[rd] = 1'b1;
        OP_CMAA:  cmaa_valid = 1'b1;
        OP_ACCEPT: accept = 1'b1;
        OP_DISCARD: begin
          discard = 1'b1;
          fp_en   = '0;
        end
        OP_MEMW:  begin mem_req = 1'b1; mem_we = 1'b1; end
        OP_MEMR:  mem_req = 1'b1;
        OP_END: begin
          waiting = 1'b1;
          stall   = !(push && push_sof);
        end
        default: ;
      endcase
    end
    if (stall) pc_nxt = pc;
  end

  assign accept_dest = imm[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; started <= 1'b0; eof_seen <= 1'b0; alu_z <= 1'b0;
      fp_en_q <= '0; wcnt <= '0; dcnt <= '0; rd_pend <= 1'b0; rd_dst <= '0;
      for (int i = 0; i < 8; i++) r[i] <= '0;
      for (int i = 0; i < 4; i++) jt[i] <= '0;
    end else begin
      if (run) started <= 1'b1;
      // word counter: 1 after the first word of a frame
      if (push) begin
        wcnt <= push_sof ? 16'd1 : wcnt + 16'd1;
        if (push_sof) eof_seen <= push_eof;
        else if (push_eof) eof_seen <= 1'b1;
      end
      if (dcnt != 0) dcnt <= dcnt - 16'd1;
      fp_en_q <= fp_en;
      pc <= pc_nxt;
      rd_pend <= 1'b0;
      if (rd_pend) r[rd_dst] <= mem_rdata;
      if (started) begin
        unique case (op)
          OP_LDI:   r[rd] <= {16'd0, imm};
          OP_ALU:   begin r[rd] <= alu_y; alu_z <= (alu_y == 32'd0); end
          OP_ADDI:  begin r[rd] <= r[ra] + {16'd0, imm}; alu_z <= (r[ra] + {16'd0, imm}) == 32'd0; end
          OP_SETJT: jt[rd[1:0]] <= imm[7:0];
          OP_LDCNT: dcnt <= imm;
          OP_RDFP:  r[rd] <= res[imm[3:0]];
          OP_MEMR:  begin rd_pend <= 1'b1; rd_dst <= rd; end
          default: ;
        endcase
      end
    end
  end
endmodule
