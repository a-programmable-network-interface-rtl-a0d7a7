// Self-checking test of the counter and controller (cc). A program exercising every
// instruction is loaded through the program port; the test then checks, cycle by
// cycle, the control strobes the controller drives and its registers:
//  - one instruction per clock (cycle count from start to the four-way jump targets),
//  - the four-way jump taking each of its four targets in one cycle, chosen by two flags,
//  - conditional branch, ALU results and the zero flag, the down counter (WAITC stalls
//    exactly the loaded number of cycles),
//  - FP enables effective in the instruction's own cycle, start strobes, operand loads,
//    CMAA instruction and dbus0 source, packet-buffer write/read, accept/discard,
//  - END waiting for a frame and WAITW starting FPs in the cycle the awaited word is
//    in chain stage 0.
module cc_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n = 0, run = 0;
  logic prog_we = 0; logic [7:0] prog_addr = 0; logic [31:0] prog_wdata = 0;
  logic push = 0, push_sof = 0, push_eof = 0;
  logic [NUM_FLAGS-1:0] flags_in = '0;
  logic [31:0] res [16];
  logic [NUM_FP-1:0] fp_en, fp_start, fp_ld; logic [1:0] fp_ld_sel; logic [31:0] fp_operand;
  logic cmaa_valid; cmaa_instr_t cmaa_instr; logic [31:0] dbus0;
  logic accept, accept_dest, discard, waiting, mem_req, mem_we; logic [7:0] mem_off;
  logic [31:0] mem_wdata, mem_rdata = 0; logic [15:0] wcnt; logic [7:0] pc;
  logic [31:0] mem [256];
  always #5 clk = ~clk;

  cc dut (.*);

  initial begin #200000; chk(0, "watchdog"); finish_tb(); end

  always_ff @(posedge clk) begin
    if (mem_req && mem_we) mem[mem_off] <= mem_wdata;
    mem_rdata <= mem[mem_off];
  end

  function automatic logic [31:0] I(cc_op_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    return cc_instr(op, 3'(rd), 3'(ra), 3'(rb), 16'(imm));
  endfunction

  logic [31:0] prog [64];
  initial begin
    for (int i = 0; i < 64; i++) prog[i] = I(OP_NOP);
    for (int i = 0; i < 16; i++) res[i] = 32'h1000_0000 + i;
    prog[0]  = I(OP_LDI, 1, 0, 0, 5);
    prog[1]  = I(OP_LDI, 2, 0, 0, 5);
    prog[2]  = I(OP_ALU, 3, 1, 2, ALU_SUB);
    prog[3]  = I(OP_BRF, 0, 0, 0, (FL_ALU_Z << 12) | (1 << 11) | 5);
    prog[4]  = I(OP_LDI, 7, 0, 0, 16'hBAD);
    prog[5]  = I(OP_SETJT, 0, 0, 0, 20);
    prog[6]  = I(OP_SETJT, 1, 0, 0, 22);
    prog[7]  = I(OP_SETJT, 2, 0, 0, 24);
    prog[8]  = I(OP_SETJT, 3, 0, 0, 26);
    prog[9]  = I(OP_MJMP, 0, 0, 0, (FL_XAC1 << 4) | FL_XAC0);
    // target k: r4 = 10 + k, then on to 30
    for (int k = 0; k < 4; k++) begin
      prog[20 + 2*k] = I(OP_ADDI, 4, 0, 0, 10 + k);
      prog[21 + 2*k] = I(OP_JMP, 0, 0, 0, 30);
    end
    prog[30] = I(OP_ADDI, 5, 4, 0, 100);        // r5 = r4 + 100
    prog[31] = I(OP_ALU, 6, 5, 5, ALU_XOR);     // r6 = 0, zero flag
    prog[32] = I(OP_LDCNT, 0, 0, 0, 10);
    prog[33] = I(OP_WAITC);
    prog[34] = I(OP_FPON, 0, 0, 0, 8'h05);
    prog[35] = I(OP_FPOFF, 0, 0, 0, 8'h01);
    prog[36] = I(OP_FPSTART, 0, 0, 0, 8'h12);
    prog[37] = I(OP_FPLD, 3, 5, 0, 2);
    prog[38] = I(OP_RDFP, 0, 0, 0, SRC_XAC1);
    prog[39] = I(OP_CMAA, 0, 4, 0, (CI_NEW_PKT << 12) | (SRC_REG0 << 8) | 8'h55);
    prog[40] = I(OP_CMAA, 0, 0, 0, (CI_LOAD_REG << 12) | (SRC_CRC << 8) | 8'h02);
    prog[41] = I(OP_MEMW, 0, 5, 0, 7);
    prog[42] = I(OP_MEMR, 1, 0, 0, 7);
    prog[43] = I(OP_NOP);                       // load delay slot
    prog[44] = I(OP_WAITF, 0, 0, 0, (FL_LEN0_EQ << 12) | (1 << 11));
    prog[45] = I(OP_ACCEPT, 0, 0, 0, 1);
    prog[46] = I(OP_DISCARD);
    prog[47] = I(OP_END);
    prog[48] = I(OP_WAITW, 0, 0, 0, (8'h40 << 8) | 3);
    prog[49] = I(OP_WAITF, 0, 0, 0, (FL_EOF << 12) | (1 << 11));
    prog[50] = I(OP_JMP, 0, 0, 0, 47);
  end

  task automatic do_push(input bit sof, input bit eof);
    push = 1; push_sof = sof; push_eof = eof;
    @(negedge clk);
    push = 0; push_sof = 0; push_eof = 0;
  endtask

  initial begin
    int n, t0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      prog_we = 1; prog_addr = 8'(i); prog_wdata = prog[i]; @(negedge clk);
    end
    prog_we = 0;
    for (int path = 0; path < 4; path++) begin
      rst_n = 0; @(negedge clk); rst_n = 1;
      flags_in = '0; flags_in[FL_XAC0] = path[0]; flags_in[FL_XAC1] = path[1];
      run = 1; @(negedge clk); run = 0;
      // the first instruction executes in this cycle
      n = 0;
      while (pc != 30 && n < 50) begin @(negedge clk); n++; end
      // 0,1,2,3,5..9 (9 instructions), target, jump: 11 cycles
      chk(n == 11, $sformatf("path %0d reached 30 after %0d cycles", path, n));
      chk(dut.r[7] == 0, "branch skipped the instruction");
      chk(dut.r[3] == 0, "ALU subtract");
      @(negedge clk);
      chk(dut.r[4] == 10 + path, $sformatf("four-way jump took target %0d", dut.r[4] - 10));
      chk(dut.r[5] == 110 + path, "ADDI");
      // pc 32: LDCNT; WAITC stalls until the counter has run down
      while (pc != 33) @(negedge clk);
      t0 = 0;
      while (pc == 33 && t0 < 40) begin @(negedge clk); t0++; end
      // ten stalled cycles plus the cycle in which WAITC completes
      chk(t0 == 11, $sformatf("down counter wait %0d cycles", t0));
      chk(pc == 34 && fp_en == 8'h05, "FP enable effective in its own cycle");
      @(negedge clk); chk(fp_en == 8'h04, "FP disable effective in its own cycle");
      @(negedge clk); chk(fp_start == 8'h12, "FP start strobe");
      @(negedge clk); chk(fp_start == 0 && fp_ld == 8'h08 && fp_ld_sel == 2 && fp_operand == 110 + path,
                          "FP operand load");
      @(negedge clk); // RDFP
      @(negedge clk); chk(dut.r[0] == res[SRC_XAC1], "read FP result");
      chk(cmaa_valid && cmaa_instr.op == CI_NEW_PKT && cmaa_instr.cfg == 8'h55 && dbus0 == 10 + path,
          "CMAA instruction with register on dbus0");
      @(negedge clk); chk(cmaa_valid && cmaa_instr.op == CI_LOAD_REG && dbus0 == res[SRC_CRC],
                          "CMAA instruction with FP result on dbus0");
      @(negedge clk); chk(mem_req && mem_we && mem_off == 7 && mem_wdata == 110 + path, "packet buffer write");
      @(negedge clk); chk(mem_req && !mem_we, "packet buffer read");
      @(negedge clk); @(negedge clk);
      chk(dut.r[1] == 110 + path, "read data back in register");
      // WAITF holds until the flag is set
      repeat (3) begin chk(pc == 44 && !accept, "waiting for flag"); @(negedge clk); end
      flags_in[FL_LEN0_EQ] = 1; #1;
      chk(pc == 44, "still at WAITF when the flag rises"); @(negedge clk);
      chk(accept && accept_dest, "accept to control memory");
      @(negedge clk); chk(discard && fp_en == 0, "discard stops all FPs");
      @(negedge clk); chk(waiting && pc == 47, "END waits");
      repeat (5) @(negedge clk);
      chk(pc == 47, "END holds without a frame");
      do_push(1, 0);
      chk(pc == 48 && wcnt == 1, "frame start releases END");
      repeat (3) begin chk(fp_start == 0, "WAITW holds"); @(negedge clk); end
      do_push(0, 0);
      repeat (3) begin chk(fp_start == 0, "WAITW holds"); @(negedge clk); end
      push = 1; #1; chk(fp_start == 0, "no start before the word is in"); @(negedge clk); push = 0;
      chk(fp_start == 8'h40 && wcnt == 3, "WAITW starts FPs when word 3 is in stage 0");
      @(negedge clk); repeat (3) @(negedge clk);
      chk(pc == 49, "waiting for end of frame");
      do_push(0, 1);
      @(negedge clk); @(negedge clk);
      chk(pc == 47 && waiting, "back at END after the frame");
      flags_in[FL_LEN0_EQ] = 0;
    end
    finish_tb();
  end
endmodule
