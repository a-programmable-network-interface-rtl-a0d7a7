// ppp_top: the programmable protocol processor (PPP), the fast path of a protocol
// processor for packet reception in a network terminal. A received Ethernet frame
// (GMII, or MII through the parallelization FP) is packed into 32-bit words that
// stream through a flip-flop chain. While they pass, the counter and controller (C&C)
// starts and stops functional pages on them: the CRC FP checks the frame, two
// extract-and-compare FPs check addresses and type fields, two checksum FPs sum
// headers, two length counters count. The C&C branches on their flags, drives the
// control memory access accelerator (CMAA), which finds the packet's reassembly
// buffer and connection in its look-up engines, and finally accepts or discards the
// packet. The word leaving the end of the chain is delivered (pay_*) if its frame
// was accepted, with its destination (host memory, or control memory for protocols
// the micro controller handles), and dropped otherwise.
// The micro controller is outside: it configures the FPs (cfg_*), loads the C&C
// program (prog_*), can issue CMAA instructions when the C&C does not (uc_cmaa_*),
// shares the control memory (uc_cm_*), and runs its time-outs on the hardware timer
// (tmr_*). Timing: one core clock; rx_byte_en marks the clocks that carry an
// interface byte (or nibble in MII mode), so the C&C can run faster than the byte
// clock, as the architecture intends. The decision for a frame must be made before
// its first word reaches the end of the chain (CHAIN_DEPTH words); a late frame is
// dropped and counted on late_drop.
// The unit set and its counts (1 CRC, 2 XAC, 2 checksum, 2 length FPs) follow the
// architecture; the interconnect, the register maps and the decision queue are this
// design's own choice.
module ppp_top
  import ppp_pkg::*;
#(
  parameter int unsigned CHAIN_DEPTH = 16,
  parameter int unsigned M = 16,
  parameter int unsigned N = 64,
  parameter int unsigned W = 20,
  parameter int unsigned SLUE_CYCLES = 3,
  parameter int unsigned TIMERS = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // network interface
  input  logic         mii_mode,      // 1: MII nibbles on mii_*, 0: GMII bytes on gmii_*
  input  logic         rx_byte_en,
  input  logic         gmii_rx_dv,
  input  logic [7:0]   gmii_rxd,
  input  logic         mii_rx_dv,
  input  logic [3:0]   mii_rxd,
  // payload out
  output logic         pay_valid,
  output strm_word_t   pay_word,
  output logic         pay_dest,      // 0 host memory, 1 control memory
  output logic         frame_accepted, // pulse per decision
  output logic         frame_discarded,
  output logic         late_drop,
  // micro controller: FP configuration and C&C program
  input  logic         cfg_we,
  input  logic [2:0]   cfg_page,      // 0 CRC, 1 XAC0, 2 XAC1, 3 LEN0, 4 LEN1
  input  logic [1:0]   cfg_addr,
  input  logic [31:0]  cfg_wdata,
  input  logic         prog_we,
  input  logic [7:0]   prog_addr,
  input  logic [31:0]  prog_wdata,
  input  logic         cc_run,
  // micro controller: CMAA instructions and flags
  input  logic         uc_cmaa_valid,
  input  cmaa_instr_t  uc_cmaa_instr,
  input  logic [31:0]  uc_dbus0,
  input  logic [31:0]  uc_dbus1,
  output logic         uc_new_packet,
  output logic         cmaa_busy,
  // micro controller: control memory
  input  logic         uc_cm_req,
  input  logic         uc_cm_we,
  input  logic [W-1:0] uc_cm_addr,
  input  logic [31:0]  uc_cm_wdata,
  output logic         uc_cm_gnt,
  output logic [31:0]  cm_rdata,
  // micro controller: hardware timer
  input  logic         tmr_tick,
  input  logic         tmr_ins,
  input  logic [7:0]   tmr_id,
  input  logic [15:0]  tmr_delay,
  input  logic         tmr_cancel,
  output logic         tmr_fire,
  output logic [7:0]   tmr_fire_id,
  output logic         tmr_busy
);
  // ---------------- network interface ----------------
  logic       g_v, m_v, push;
  strm_word_t g_w, m_w, in_w;

  gmii_rx u_gmii (.clk, .rst_n, .rx_dv(gmii_rx_dv && !mii_mode), .byte_en(rx_byte_en),
                  .rxd(gmii_rxd), .out_valid(g_v), .out_word(g_w));
  mii_par_fp u_mii (.clk, .rst_n, .rx_dv(mii_rx_dv && mii_mode), .nib_en(rx_byte_en), .rxd(mii_rxd),
                    .out_valid(m_v), .out_word(m_w));

  assign push = mii_mode ? m_v : g_v;
  assign in_w = mii_mode ? m_w : g_w;

  // ---------------- input buffer chain ----------------
  strm_word_t taps [CHAIN_DEPTH];
  logic       tap_v [CHAIN_DEPTH];
  logic       ch_v, flush;
  strm_word_t ch_w;

  input_buffer_chain #(.DEPTH(CHAIN_DEPTH)) u_chain (
    .clk, .rst_n, .in_valid(push), .in_word(in_w), .flush,
    .taps, .tap_v, .out_valid(ch_v), .out_word(ch_w)
  );

  // ---------------- counter and controller ----------------
  logic [NUM_FP-1:0] fp_en, fp_start, fp_ld;
  logic [1:0]  fp_ld_sel;
  logic [31:0] fp_operand, dbus0_cc, cm_dbus1;
  logic        cc_cmaa_v, cc_acc, cc_acc_dest, cc_disc, cc_wait;
  cmaa_instr_t cc_cmaa_i;
  logic [NUM_FLAGS-1:0] flags;
  logic [31:0] res [16];
  logic        mem_req, mem_we;
  logic [7:0]  mem_off;
  logic [31:0] mem_wdata;
  logic [15:0] wcnt;
  logic [7:0]  pc;

  cc u_cc (
    .clk, .rst_n, .run(cc_run), .prog_we, .prog_addr, .prog_wdata,
    .push, .push_sof(in_w.sof), .push_eof(in_w.eof),
    .flags_in(flags), .res,
    .fp_en, .fp_start, .fp_ld, .fp_ld_sel, .fp_operand,
    .cmaa_valid(cc_cmaa_v), .cmaa_instr(cc_cmaa_i), .dbus0(dbus0_cc),
    .accept(cc_acc), .accept_dest(cc_acc_dest), .discard(cc_disc), .waiting(cc_wait),
    .mem_req, .mem_we, .mem_off, .mem_wdata, .mem_rdata(cm_rdata),
    .wcnt, .pc
  );

  // ---------------- functional pages ----------------
  logic [31:0] crc, xv0, xv1;
  logic        crc_ok, x0_m, x1_m, x0_w, x1_w;
  logic [3:0]  x0_b, x1_b;
  logic [1:0]  x0_h, x1_h;
  logic [15:0] cs0, cs1, l0_acc, l0_stop, l1_acc, l1_stop;
  logic        cs0_ok, cs1_ok, l0_eq, l0_z, l1_eq, l1_z;

  crc_fp #(.STEPS(8)) u_crc (
    .clk, .rst_n, .cfg_we(cfg_we && cfg_page == 3'd0), .cfg_addr, .cfg_wdata,
    .start(fp_start[FP_CRC]), .en(fp_en[FP_CRC]), .din_valid(push), .din(in_w.data),
    .din_nibs({in_w.nbytes, 1'b0}), .crc, .crc_ok
  );
  xac_fp u_xac0 (.clk, .rst_n, .cfg_we(cfg_we && cfg_page == 3'd1), .cfg_addr, .cfg_wdata,
    .start(fp_start[FP_XAC0]), .word(taps[0].data), .vec(xv0), .byte_eq(x0_b), .half_eq(x0_h),
    .word_eq(x0_w), .match(x0_m));
  xac_fp u_xac1 (.clk, .rst_n, .cfg_we(cfg_we && cfg_page == 3'd2), .cfg_addr, .cfg_wdata,
    .start(fp_start[FP_XAC1]), .word(taps[0].data), .vec(xv1), .byte_eq(x1_b), .half_eq(x1_h),
    .word_eq(x1_w), .match(x1_m));
  checksum_fp u_cs0 (.clk, .rst_n, .start(fp_start[FP_CSUM0]),
    .ld(fp_ld[FP_CSUM0] && fp_ld_sel == 2'd0), .add_op(fp_ld[FP_CSUM0] && fp_ld_sel == 2'd2),
    .ld_val(fp_operand[15:0]), .en(fp_en[FP_CSUM0]), .din_valid(push), .din(in_w.data),
    .din_bytes(in_w.nbytes), .sum(cs0), .ok(cs0_ok));
  checksum_fp u_cs1 (.clk, .rst_n, .start(fp_start[FP_CSUM1]),
    .ld(fp_ld[FP_CSUM1] && fp_ld_sel == 2'd0), .add_op(fp_ld[FP_CSUM1] && fp_ld_sel == 2'd2),
    .ld_val(fp_operand[15:0]), .en(fp_en[FP_CSUM1]), .din_valid(push), .din(in_w.data),
    .din_bytes(in_w.nbytes), .sum(cs1), .ok(cs1_ok));
  length_counter_fp u_len0 (.clk, .rst_n, .cfg_we(cfg_we && cfg_page == 3'd3), .cfg_wdata,
    .start(fp_start[FP_LEN0]), .ld_acc(fp_ld[FP_LEN0] && fp_ld_sel == 2'd0),
    .ld_stop(fp_ld[FP_LEN0] && fp_ld_sel == 2'd1), .add_op(fp_ld[FP_LEN0] && fp_ld_sel == 2'd2),
    .ld_val(fp_operand[15:0]), .en(fp_en[FP_LEN0]), .din_valid(push), .din_bytes(in_w.nbytes),
    .acc(l0_acc), .stop(l0_stop), .eq(l0_eq), .zero(l0_z));
  length_counter_fp u_len1 (.clk, .rst_n, .cfg_we(cfg_we && cfg_page == 3'd4), .cfg_wdata,
    .start(fp_start[FP_LEN1]), .ld_acc(fp_ld[FP_LEN1] && fp_ld_sel == 2'd0),
    .ld_stop(fp_ld[FP_LEN1] && fp_ld_sel == 2'd1), .add_op(fp_ld[FP_LEN1] && fp_ld_sel == 2'd2),
    .ld_val(fp_operand[15:0]), .en(fp_en[FP_LEN1]), .din_valid(push), .din_bytes(in_w.nbytes),
    .acc(l1_acc), .stop(l1_stop), .eq(l1_eq), .zero(l1_z));

  // ---------------- CMAA and control memory ----------------
  logic        cm_ready, cm_disc, cm_frag_old, cm_we, cm_v;
  logic        plue_full, slue_full;
  logic [W-1:0] cm_addr, pkt_buf;
  logic [31:0] cm_wdata, dbus0;
  cmaa_instr_t cm_i;

  assign cm_v  = cc_cmaa_v || uc_cmaa_valid;
  assign cm_i  = cc_cmaa_v ? cc_cmaa_i : uc_cmaa_instr;
  assign dbus0 = cc_cmaa_v ? dbus0_cc : uc_dbus0;

  cmaa #(.M(M), .N(N), .W(W), .SLUE_CYCLES(SLUE_CYCLES)) u_cmaa (
    .clk, .rst_n, .instr_valid(cm_v), .instr(cm_i), .dbus0, .dbus1_in(uc_dbus1),
    .dbus1_out(cm_dbus1), .packet_ready(cm_ready), .discard(cm_disc), .frag_old(cm_frag_old),
    .pkt_buf, .busy(cmaa_busy), .uc_new_packet, .plue_full, .slue_full,
    .ppp_req(mem_req), .ppp_we(mem_we), .ppp_off(mem_off), .ppp_wdata(mem_wdata),
    .uc_req(uc_cm_req), .uc_we(uc_cm_we), .uc_addr(uc_cm_addr), .uc_wdata(uc_cm_wdata),
    .uc_gnt(uc_cm_gnt), .cm_we, .cm_addr, .cm_wdata
  );

  control_memory #(.AW(W)) u_cm (.clk, .we(cm_we), .addr(cm_addr), .wdata(cm_wdata),
                                 .rdata(cm_rdata));

  // ---------------- flags and results seen by the C&C ----------------
  always_comb begin
    flags = '0;
    flags[FL_XAC0]     = x0_m;
    flags[FL_XAC1]     = x1_m;
    flags[FL_CRC_OK]   = crc_ok;
    flags[FL_CSUM0_OK] = cs0_ok;
    flags[FL_CSUM1_OK] = cs1_ok;
    flags[FL_LEN0_EQ]  = l0_eq;
    flags[FL_LEN0_Z]   = l0_z;
    flags[FL_LEN1_EQ]  = l1_eq;
    flags[FL_LEN1_Z]   = l1_z;
    flags[FL_CM_READY] = cm_ready;
    flags[FL_CM_DISC]  = cm_disc;
    flags[FL_XAC0_B0]  = x0_b[0];
    flags[FL_XAC0_H1]  = x0_h[1];
    for (int i = 0; i < 16; i++) res[i] = '0;
    res[SRC_HEAD]  = taps[0].data;
    res[SRC_XAC0]  = xv0;
    res[SRC_XAC1]  = xv1;
    res[SRC_LEN0]  = {l0_stop, l0_acc};
    res[SRC_LEN1]  = {l1_stop, l1_acc};
    res[SRC_CSUM0] = {16'd0, cs0};
    res[SRC_CSUM1] = {16'd0, cs1};
    res[SRC_CRC]   = crc;
    res[SRC_CMPTR] = cm_dbus1;
    res[10]        = {11'd0, cm_frag_old, pkt_buf};
  end

  // ---------------- decision queue and payload delivery ----------------
  // One entry per decided frame, in frame order. The entry is used when the frame's
  // first word leaves the chain (a decision made in that very cycle is used directly)
  // and popped with its last word. A frame without a decision by then is dropped
  // whole, and the decision that comes later for it is thrown away (skip_dec).
  logic [1:0] dq_acc, dq_dest;
  logic [1:0] dq_cnt;
  logic       dec_now, dec_use, in_frame, cur_acc, cur_dest, cur_late, skip_dec;
  logic       head_v, head_acc, head_dest;

  assign dec_now   = cc_acc || cc_disc;
  assign dec_use   = dec_now && !skip_dec;
  assign head_v    = (dq_cnt != 0) || dec_use;
  assign head_acc  = (dq_cnt != 0) ? dq_acc[0]  : cc_acc;
  assign head_dest = (dq_cnt != 0) ? dq_dest[0] : cc_acc_dest;
  assign frame_accepted  = cc_acc;
  assign frame_discarded = cc_disc;
  // drain the chain between frames once the waiting frame is decided
  assign flush = !push && (dq_cnt != 0) && cc_wait && !(mii_mode ? mii_rx_dv : gmii_rx_dv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_acc <= '0; dq_dest <= '0; dq_cnt <= '0;
      in_frame <= 1'b0; cur_acc <= 1'b0; cur_dest <= 1'b0; cur_late <= 1'b0; skip_dec <= 1'b0;
      pay_valid <= 1'b0; pay_word <= '0; pay_dest <= 1'b0; late_drop <= 1'b0;
    end else begin
      logic pop, skip;
      logic [1:0] cnt;
      logic [1:0] qa, qd;
      pop  = 1'b0;
      skip = skip_dec;
      late_drop <= 1'b0;
      pay_valid <= 1'b0;
      qa = dq_acc; qd = dq_dest; cnt = dq_cnt;
      // a decision enters the queue (or is thrown away for a dropped frame)
      if (dec_now && skip) begin
        skip = 1'b0;
      end else if (dec_now && cnt != 2'd2) begin
        qa[cnt[0]] = cc_acc; qd[cnt[0]] = cc_acc_dest; cnt = cnt + 2'd1;
      end
      if (ch_v) begin
        logic acc_w, dest_w;
        if (ch_w.sof) begin
          // first word of a frame: its decision must be known by now
          acc_w  = head_v && head_acc;
          dest_w = head_dest;
          cur_late  <= !head_v;
          late_drop <= !head_v;
          if (!head_v) skip = 1'b1;
          cur_acc  <= acc_w;
          cur_dest <= dest_w;
          in_frame <= !ch_w.eof;
          pop = ch_w.eof && head_v;
        end else begin
          acc_w  = cur_acc;
          dest_w = cur_dest;
          if (ch_w.eof) begin
            in_frame <= 1'b0;
            pop = !cur_late;
          end
        end
        pay_valid <= acc_w;
        pay_word  <= ch_w;
        pay_dest  <= dest_w;
      end
      if (pop && cnt != 0) begin
        qa = {1'b0, qa[1]}; qd = {1'b0, qd[1]}; cnt = cnt - 2'd1;
      end
      dq_acc <= qa; dq_dest <= qd; dq_cnt <= cnt; skip_dec <= skip;
    end
  end

  // ---------------- hardware timer ----------------
  logic        tmr_full;
  logic [15:0] tmr_now;
  hw_timer #(.ENTRIES(TIMERS), .T_W(16), .ID_W(8)) u_tmr (
    .clk, .rst_n, .tick(tmr_tick), .ins(tmr_ins), .ins_id(tmr_id), .ins_delay(tmr_delay),
    .cancel(tmr_cancel), .cancel_id(tmr_id), .busy(tmr_busy), .full(tmr_full),
    .fire(tmr_fire), .fire_id(tmr_fire_id), .now(tmr_now)
  );
endmodule
