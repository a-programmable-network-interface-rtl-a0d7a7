// ppp_pkg: types and constants shared by the programmable protocol processor (PPP).
// It fixes the data-word width of the input chain (32 bits, as in the architecture),
// the control-memory address width W, the instruction set the counter and controller
// (C&C) issues to the control memory access accelerator (CMAA, six instructions),
// the C&C's own instruction encoding, and the numbering of functional-page (FP)
// control lines and result flags. The CMAA instruction list follows the architecture;
// all encodings and numberings are this design's own choice.
package ppp_pkg;

  localparam int unsigned DATA_W = 32;   // input chain and data bus width
  localparam int unsigned CM_AW  = 20;   // control memory address width W

  // One word of the received stream: 32 data bits, first byte of the frame in
  // [31:24], number of valid bytes (1..4, counted from [31:24]) and frame markers.
  typedef struct packed {
    logic        sof;
    logic        eof;
    logic [2:0]  nbytes;
    logic [31:0] data;
  } strm_word_t;

  // ---------------- CMAA lightweight instruction set ----------------
  typedef enum logic [2:0] {
    CI_NOP      = 3'd0,
    CI_NEW_PKT  = 3'd1,  // dbus0 = IP identification, cfg = packet info
    CI_LOAD_REG = 3'd2,  // dbus0 = port or address word, cfg = key word index
    CI_ID_CAM   = 3'd3,  // PLUE operation, cfg = lue_op_e
    CI_PA_CAM   = 3'd4,  // SLUE operation, cfg = lue_op_e
    CI_RELEASE  = 3'd5,  // release packet to micro controller
    CI_SET_BUF  = 3'd6   // dbus1 = buffer base/stride, cfg = buffer class
  } cmaa_op_e;

  typedef enum logic [1:0] {
    LUE_READ   = 2'd0,
    LUE_WRITE  = 2'd1,
    LUE_REMOVE = 2'd2
  } lue_op_e;

  // cfg field of CI_NEW_PKT
  typedef struct packed {
    logic       fragmented;  // packet is an IP fragment: look it up in the PLUE
    logic       has_l4;      // packet carries the layer-4 header: check it in the SLUE
    logic [5:0] ptype;       // internal packet type
  } newpkt_cfg_t;

  typedef struct packed {
    cmaa_op_e   op;
    logic [7:0] cfg;
  } cmaa_instr_t;

  // SLUE key: internal type, ports and a 128-bit address field
  typedef struct packed {
    logic [7:0]   ptype;
    logic [15:0]  sport;
    logic [15:0]  dport;
    logic [127:0] addr;
  } slue_key_t;

  // ---------------- FP control and flags ----------------
  localparam int unsigned NUM_FP = 8;
  localparam int unsigned FP_CRC   = 0;
  localparam int unsigned FP_XAC0  = 1;
  localparam int unsigned FP_XAC1  = 2;
  localparam int unsigned FP_CSUM0 = 3;
  localparam int unsigned FP_CSUM1 = 4;
  localparam int unsigned FP_LEN0  = 5;
  localparam int unsigned FP_LEN1  = 6;

  localparam int unsigned NUM_FLAGS = 16;
  localparam int unsigned FL_XAC0     = 0;
  localparam int unsigned FL_XAC1     = 1;
  localparam int unsigned FL_CRC_OK   = 2;
  localparam int unsigned FL_CSUM0_OK = 3;
  localparam int unsigned FL_CSUM1_OK = 4;
  localparam int unsigned FL_LEN0_EQ  = 5;
  localparam int unsigned FL_LEN0_Z   = 6;
  localparam int unsigned FL_LEN1_EQ  = 7;
  localparam int unsigned FL_LEN1_Z   = 8;
  localparam int unsigned FL_CM_READY = 9;   // CMAA packet-ready
  localparam int unsigned FL_CM_DISC  = 10;  // CMAA says discard (no connection)
  localparam int unsigned FL_EOF      = 11;  // frame has ended
  localparam int unsigned FL_ALU_Z    = 12;  // last ALU result was zero
  localparam int unsigned FL_XAC0_B0  = 13;  // XAC0 byte-0 comparison
  localparam int unsigned FL_XAC0_H1  = 14;  // XAC0 upper half-word comparison
  localparam int unsigned FL_ONE      = 15;  // constant 1

  // ---------------- C&C instruction word ----------------
  // [31:27] opcode, [26:24] rd, [23:21] ra, [20:18] rb, [15:0] immediate
  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_LDI    = 5'd1,   // r[rd] = imm16
    OP_ALU    = 5'd2,   // r[rd] = r[ra] fn r[rb], fn = imm[2:0]
    OP_ADDI   = 5'd3,   // r[rd] = r[ra] + imm16
    OP_JMP    = 5'd4,   // pc = imm
    OP_BRF    = 5'd5,   // if flag[imm[15:12]] == imm[11] then pc = imm[7:0]
    OP_SETJT  = 5'd6,   // jump target register rd[1:0] = imm
    OP_MJMP   = 5'd7,   // pc = jt[{flag[imm[7:4]], flag[imm[3:0]]}]
    OP_WAITW  = 5'd8,   // stall until word counter >= imm[7:0], then start FPs imm[15:8]
    OP_WAITF  = 5'd9,   // stall until flag[imm[15:12]] == imm[11]
    OP_LDCNT  = 5'd10,  // load down counter with imm
    OP_WAITC  = 5'd11,  // stall until down counter is zero
    OP_FPON   = 5'd12,  // fp_en |= imm[7:0]
    OP_FPOFF  = 5'd13,  // fp_en &= ~imm[7:0]
    OP_FPSTART= 5'd14,  // one-cycle start strobe on fp imm[7:0]
    OP_FPLD   = 5'd15,  // operand load: r[ra] to FP rd, imm[1:0] 0 load, 1 stop, 2 add
    OP_RDFP   = 5'd16,  // r[rd] = FP result selected by imm[3:0]
    OP_CMAA   = 5'd17,  // CMAA instr: op imm[14:12], cfg imm[7:0], dbus0 source imm[11:8]
    OP_ACCEPT = 5'd18,  // accept packet, destination imm[0] (0 host, 1 control memory)
    OP_DISCARD= 5'd19,  // discard packet, shut all FPs down
    OP_END    = 5'd20,  // wait for the first word of the next frame
    OP_MEMW   = 5'd21,  // control memory[packet buffer + imm[7:0]] = r[ra]
    OP_MEMR   = 5'd22   // r[rd] = control memory[packet buffer + imm[7:0]] (next cycle)
  } cc_op_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3,
    ALU_XOR = 3'd4, ALU_SHR16 = 3'd5, ALU_LO16 = 3'd6, ALU_SHL16 = 3'd7
  } alu_fn_e;

  // dbus0 sources selected by OP_CMAA and FP results selected by OP_RDFP
  localparam int unsigned SRC_HEAD  = 0;  // newest chain word
  localparam int unsigned SRC_XAC0  = 1;
  localparam int unsigned SRC_XAC1  = 2;
  localparam int unsigned SRC_REG0  = 3;  // C&C register r[ra] (OP_CMAA only)
  localparam int unsigned SRC_LEN0  = 4;
  localparam int unsigned SRC_LEN1  = 5;
  localparam int unsigned SRC_CSUM0 = 6;
  localparam int unsigned SRC_CSUM1 = 7;
  localparam int unsigned SRC_CRC   = 8;
  localparam int unsigned SRC_CMPTR = 9;  // CMAA connection pointer (dbus1)

  function automatic logic [31:0] cc_instr(cc_op_e op, logic [2:0] rd, logic [2:0] ra,
                                           logic [2:0] rb, logic [15:0] imm);
    return {op, rd, ra, rb, 2'b00, imm};
  endfunction

endpackage
