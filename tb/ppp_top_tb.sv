// End-to-end test of ppp_top, run at the design's default parameters (chain of 16
// words, PLUE 16 x 20 bit, SLUE 64 entries, three-cycle SLUE, 16 timers).
// The test plays the micro controller: it configures the extract-and-compare FPs,
// loads a C&C program, writes one UDP connection into the SLUE through the CMAA and
// sets the packet buffer area. It then sends a sequence of Ethernet frames, over GMII
// (one byte every second clock, so the C&C runs at twice the byte rate) and one over
// MII, and checks every frame's fate and the delivered words against a model.
// The C&C program (assembled below, with labels) does per frame:
//   prepare: clear CRC, checksum and length FPs, preload the checksum with the one's
//            complement of the type field so that the IP header sum can start at word
//            4, enable CRC and length counting; END waits for the frame.
//   word 1:  XAC0 compares the destination address high part; mismatch -> discard.
//   word 2:  the ALU compares the address low part.
//   word 4:  XAC1 compares the type field with IPv4, the ALU with ARP; a four-way jump
//            on both flags goes to IP, ARP or discard.
//   IP:      words 5..10: identification, fragment field, total length (-> stop value
//            of the length counter), addresses and ports assembled in registers; the
//            checksum FP covers the 20-byte header; bad header checksum -> discard.
//            CMAA: NEW_PKT (fragmented / first fragment / later fragment variants) with
//            the identification on dbus0, key loads and the SLUE read back to back;
//            wait for packet-ready, then for the end of frame; CRC, length and
//            connection decide; an accepted packet gets a variable written into its
//            buffer and goes to host memory; RELEASE.
//   ARP:     after the CRC check, accepted to the control memory.
// Every mechanism the architecture names is counted, and a mechanism that never
// occurs counts as a failure. CMAA latencies are checked against the architecture's latency
// figures (new IPv4 packet 9 cycles, later fragment 4 cycles).
module ppp_top_tb;
  import ppp_pkg::*;
  `include "tb_check.svh"
  localparam int W = 20;
  logic clk = 0, rst_n = 0;
  logic mii_mode = 0, rx_byte_en = 0, gmii_rx_dv = 0, mii_rx_dv = 0;
  logic [7:0] gmii_rxd = 0; logic [3:0] mii_rxd = 0;
  logic pay_valid, pay_dest, frame_accepted, frame_discarded, late_drop;
  strm_word_t pay_word;
  logic cfg_we = 0; logic [2:0] cfg_page = 0; logic [1:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0;
  logic prog_we = 0; logic [7:0] prog_addr = 0; logic [31:0] prog_wdata = 0; logic cc_run = 0;
  logic uc_cmaa_valid = 0; cmaa_instr_t uc_cmaa_instr = '0; logic [31:0] uc_dbus0 = 0, uc_dbus1 = 0;
  logic uc_new_packet, cmaa_busy;
  logic uc_cm_req = 0, uc_cm_we = 0; logic [W-1:0] uc_cm_addr = 0; logic [31:0] uc_cm_wdata = 0;
  logic uc_cm_gnt; logic [31:0] cm_rdata;
  logic tmr_tick = 0, tmr_ins = 0, tmr_cancel = 0; logic [7:0] tmr_id = 0; logic [15:0] tmr_delay = 0;
  logic tmr_fire, tmr_busy; logic [7:0] tmr_fire_id;

  always #5 clk = ~clk;

  ppp_top dut (.*);

  initial begin #2000000; chk(0, "watchdog"); finish_tb(); end

  // ---------------- C&C program, two-pass assembler ----------------
  int pass, a;
  int lab [string];
  logic [31:0] prog [256];
  function automatic void emit(logic [31:0] x);
    if (pass == 2) prog[a] = x;
    a++;
  endfunction
  function automatic void label(string n);
    lab[n] = a;
  endfunction
  function automatic int T(string n);
    return (pass == 2) ? lab[n] : 0;
  endfunction
  function automatic logic [31:0] I(cc_op_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    return cc_instr(op, 3'(rd), 3'(ra), 3'(rb), 16'(imm));
  endfunction
  function automatic int BR(int flag, bit val, int target);
    return (flag << 12) | (int'(val) << 11) | target;
  endfunction
  function automatic int CM(cmaa_op_e op, int src, int cfg);
    return (int'(op) << 12) | (src << 8) | cfg;
  endfunction
  localparam int MCRC = 1 << FP_CRC, MX0 = 1 << FP_XAC0, MX1 = 1 << FP_XAC1;
  localparam int MCS0 = 1 << FP_CSUM0, MLEN0 = 1 << FP_LEN0;
  localparam logic [15:0] DA_LO = 16'h0001;

  function automatic void asm_prog();
    a = 0;
    emit(I(OP_SETJT, 0, 0, 0, T("DROP_TYPE")));
    emit(I(OP_SETJT, 1, 0, 0, T("ARP")));
    emit(I(OP_SETJT, 2, 0, 0, T("IP")));
    emit(I(OP_SETJT, 3, 0, 0, T("DROP_TYPE")));
    label("LOOP");
    emit(I(OP_FPSTART, 0, 0, 0, MCRC | MCS0 | MLEN0));
    emit(I(OP_LDI, 6, 0, 0, 16'hF7FF));
    emit(I(OP_FPLD, FP_CSUM0, 6, 0, 0));
    emit(I(OP_FPON, 0, 0, 0, MCRC | MLEN0));
    emit(I(OP_LDI, 5, 0, 0, DA_LO));
    emit(I(OP_LDI, 4, 0, 0, 16'h0806));
    emit(I(OP_END));
    emit(I(OP_WAITW, 0, 0, 0, (MX0 << 8) | 1));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_XAC0, 0, T("DROP_DA"))));
    emit(I(OP_WAITW, 0, 0, 0, 2));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 2, 1, 0, ALU_SHR16));
    emit(I(OP_ALU, 2, 2, 5, ALU_XOR));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_ALU_Z, 0, T("DROP_DA"))));
    emit(I(OP_WAITW, 0, 0, 0, 3));
    emit(I(OP_FPON, 0, 0, 0, MCS0));
    emit(I(OP_WAITW, 0, 0, 0, (MX1 << 8) | 4));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 2, 1, 0, ALU_SHR16));
    emit(I(OP_ALU, 2, 2, 4, ALU_XOR));
    emit(I(OP_MJMP, 0, 0, 0, (FL_XAC1 << 4) | FL_ALU_Z));
    label("IP");
    emit(I(OP_WAITW, 0, 0, 0, 5));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 5, 1, 0, ALU_LO16));
    emit(I(OP_ALU, 7, 1, 0, ALU_SHR16));
    emit(I(OP_ADDI, 7, 7, 0, 18));
    emit(I(OP_FPLD, FP_LEN0, 7, 0, 1));
    emit(I(OP_WAITW, 0, 0, 0, 6));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 4, 1, 0, ALU_SHR16));
    emit(I(OP_WAITW, 0, 0, 0, 7));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 2, 1, 0, ALU_SHL16));
    emit(I(OP_WAITW, 0, 0, 0, 8));
    emit(I(OP_FPOFF, 0, 0, 0, MCS0));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 3, 1, 0, ALU_SHR16));
    emit(I(OP_ALU, 2, 2, 3, ALU_OR));
    emit(I(OP_ALU, 3, 1, 0, ALU_SHL16));
    emit(I(OP_WAITW, 0, 0, 0, 9));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 0, 1, 0, ALU_SHR16));
    emit(I(OP_FPLD, FP_CSUM0, 0, 0, 2));
    emit(I(OP_ALU, 3, 3, 0, ALU_OR));
    emit(I(OP_ALU, 0, 1, 0, ALU_SHL16));
    emit(I(OP_WAITW, 0, 0, 0, 10));
    emit(I(OP_RDFP, 1, 0, 0, SRC_HEAD));
    emit(I(OP_ALU, 1, 1, 0, ALU_SHR16));
    emit(I(OP_ALU, 0, 0, 1, ALU_OR));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_CSUM0_OK, 0, T("DROP_CS"))));
    emit(I(OP_LDI, 1, 0, 0, 16'h3FFF));
    emit(I(OP_ALU, 1, 4, 1, ALU_AND));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_ALU_Z, 1, T("UNFRAG"))));
    emit(I(OP_LDI, 1, 0, 0, 16'h1FFF));
    emit(I(OP_ALU, 1, 4, 1, ALU_AND));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_ALU_Z, 1, T("FIRST"))));
    // later fragment: only the identification is looked up
    emit(I(OP_CMAA, 0, 5, 0, CM(CI_NEW_PKT, SRC_REG0, 8'h84)));
    emit(I(OP_JMP, 0, 0, 0, T("WAITCM")));
    label("FIRST");
    emit(I(OP_CMAA, 0, 5, 0, CM(CI_NEW_PKT, SRC_REG0, 8'hC4)));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_LOAD_REG, SRC_REG0, 0)));
    emit(I(OP_CMAA, 0, 2, 0, CM(CI_LOAD_REG, SRC_REG0, 1)));
    emit(I(OP_CMAA, 0, 3, 0, CM(CI_LOAD_REG, SRC_REG0, 4)));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_PA_CAM, SRC_REG0, LUE_READ)));
    emit(I(OP_JMP, 0, 0, 0, T("WAITCM")));
    label("UNFRAG");
    emit(I(OP_CMAA, 0, 5, 0, CM(CI_NEW_PKT, SRC_REG0, 8'h44)));
    label("LOADS");
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_LOAD_REG, SRC_REG0, 0)));
    emit(I(OP_CMAA, 0, 2, 0, CM(CI_LOAD_REG, SRC_REG0, 1)));
    emit(I(OP_CMAA, 0, 3, 0, CM(CI_LOAD_REG, SRC_REG0, 4)));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_PA_CAM, SRC_REG0, LUE_READ)));
    label("WAITCM");
    emit(I(OP_WAITF, 0, 0, 0, BR(FL_CM_READY, 1, 0)));
    emit(I(OP_WAITF, 0, 0, 0, BR(FL_EOF, 1, 0)));
    emit(I(OP_NOP));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_CRC_OK, 0, T("DROP_CRC"))));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_LEN0_EQ, 0, T("DROP_LEN"))));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_CM_DISC, 1, T("DROP_CM"))));
    emit(I(OP_MEMW, 0, 0, 0, 1));
    emit(I(OP_ACCEPT, 0, 0, 0, 0));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_RELEASE, SRC_REG0, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_CRC");
    emit(I(OP_DISCARD));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_RELEASE, SRC_REG0, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_LEN");
    emit(I(OP_DISCARD));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_RELEASE, SRC_REG0, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_CM");
    emit(I(OP_DISCARD));
    emit(I(OP_CMAA, 0, 0, 0, CM(CI_RELEASE, SRC_REG0, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("ARP");
    emit(I(OP_WAITF, 0, 0, 0, BR(FL_EOF, 1, 0)));
    emit(I(OP_NOP));
    emit(I(OP_BRF, 0, 0, 0, BR(FL_CRC_OK, 0, T("DROP_ARP"))));
    emit(I(OP_ACCEPT, 0, 0, 0, 1));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_ARP");
    emit(I(OP_DISCARD));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_DA");
    emit(I(OP_DISCARD));
    emit(I(OP_WAITF, 0, 0, 0, BR(FL_EOF, 1, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_TYPE");
    emit(I(OP_DISCARD));
    emit(I(OP_WAITF, 0, 0, 0, BR(FL_EOF, 1, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
    label("DROP_CS");
    emit(I(OP_DISCARD));
    emit(I(OP_WAITF, 0, 0, 0, BR(FL_EOF, 1, 0)));
    emit(I(OP_JMP, 0, 0, 0, T("LOOP")));
  endfunction

  // ---------------- frame construction ----------------
  typedef byte unsigned bq_t [$];
  function automatic bq_t fcs_append(bq_t f, bit corrupt = 0);
    logic [31:0] c = '1;
    foreach (f[i]) begin
      c ^= 32'(f[i]);
      repeat (8) c = (c >> 1) ^ (c[0] ? 32'hEDB88320 : 32'h0);
    end
    c = ~c;
    if (corrupt) c ^= 32'h0000_0100;
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    return f;
  endfunction
  function automatic void put16(ref bq_t f, input logic [15:0] v);
    f.push_back(v[15:8]); f.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bq_t f, input logic [31:0] v);
    put16(f, v[31:16]); put16(f, v[15:0]);
  endfunction
  function automatic bq_t eth(logic [47:0] da, logic [15:0] etype);
    bq_t f;
    for (int i = 5; i >= 0; i--) f.push_back(da[8*i +: 8]);
    for (int i = 0; i < 6; i++) f.push_back(8'h10 + 8'(i));
    put16(f, etype);
    return f;
  endfunction
  // IPv4 + (optionally) UDP, total length = 20 + body, no padding when body >= 26
  function automatic bq_t ipv4(logic [15:0] id, logic [15:0] frag, logic [15:0] sport,
                               logic [15:0] dport, int body, bit udp, int len_adj = 0,
                               bit bad_csum = 0, logic [47:0] da = {32'h02000000, DA_LO});
    bq_t f = eth(da, 16'h0800);
    bq_t h;
    logic [31:0] s = 0;
    logic [15:0] tl = 16'(20 + body + len_adj);
    put16(h, 16'h4500); put16(h, tl); put16(h, id); put16(h, frag);
    put16(h, 16'h4011); put16(h, 16'h0000);
    put32(h, 32'h0A000001); put32(h, 32'h0A000002);
    for (int i = 0; i < 20; i += 2) s += {h[i], h[i+1]};
    s = (s & 32'hFFFF) + (s >> 16); s = (s & 32'hFFFF) + (s >> 16);
    s = ~s;
    if (bad_csum) s ^= 32'h1;
    h[10] = s[15:8]; h[11] = s[7:0];
    f = {f, h};
    if (udp) begin
      put16(f, sport); put16(f, dport); put16(f, 16'(body)); put16(f, 16'h0000);
      body -= 8;
    end
    for (int i = 0; i < body; i++) f.push_back(8'($urandom));
    while (f.size() < 60) f.push_back(8'h00);
    return f;
  endfunction
  function automatic bq_t other(logic [15:0] etype, int n);
    bq_t f = eth({32'h02000000, DA_LO}, etype);
    while (f.size() < n - 4) f.push_back(8'($urandom));
    return f;
  endfunction

  // ---------------- expected results ----------------
  typedef struct { bit acc; bit dest; strm_word_t w [$]; } exp_t;
  exp_t exp_q [$];
  int n_dec_acc_exp = 0, n_dec_disc_exp = 0;

  function automatic void expect_frame(bq_t f, bit acc, bit dest, bit decided = 1);
    exp_t e;
    int n = f.size();
    e.acc = acc; e.dest = dest;
    for (int i = 0; i < n; i += 4) begin
      strm_word_t w = '0;
      w.nbytes = 3'((n - i) >= 4 ? 4 : n - i);
      for (int j = 0; j < 4; j++) if (i + j < n) w.data[31-8*j -: 8] = f[i+j];
      w.sof = (i == 0); w.eof = (i + 4 >= n);
      e.w.push_back(w);
    end
    if (acc) exp_q.push_back(e);
    if (decided) begin
      if (acc) n_dec_acc_exp++; else n_dec_disc_exp++;
    end
  endfunction

  // received payload, compared frame by frame
  strm_word_t cur [$];
  bit cur_dest;
  int m_pay_host = 0, m_pay_cm = 0, m_frames_ok = 0;
  always @(posedge clk) if (rst_n && pay_valid) begin
    if (pay_word.sof) begin cur = {}; cur_dest = pay_dest; end
    cur.push_back(pay_word);
    if (pay_dest) m_pay_cm++; else m_pay_host++;
    chk(pay_dest == cur_dest, "destination constant within a frame");
    if (pay_word.eof) begin
      if (exp_q.size() == 0) chk(0, "unexpected delivered frame");
      else begin
        exp_t e;
        e = exp_q.pop_front();
        chk(e.w.size() == cur.size(), $sformatf("delivered %0d words, expected %0d", cur.size(), e.w.size()));
        foreach (e.w[i]) if (i < cur.size()) chk(cur[i] == e.w[i], $sformatf("payload word %0d", i));
        chk(cur_dest == e.dest, "payload destination");
        m_frames_ok++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int m_acc = 0, m_disc = 0, m_late = 0, m_gmii = 0, m_mii = 0, m_new = 0;
  int m_plue_hit = 0, m_slue_hit = 0, m_slue_miss = 0, m_fire = 0, m_flush = 0;
  int m_visit [string];
  int lat = -1; bit lat_run = 0; bit lat_l4 = 0; int m_lat_ok = 0;
  logic [7:0] pc_q = 0;
  logic rdy_q = 0;
  string visit_names [$] = '{"IP", "ARP", "DROP_TYPE", "DROP_DA", "DROP_CS", "DROP_CRC",
                             "DROP_LEN", "DROP_CM", "FIRST", "UNFRAG", "WAITCM"};
  always @(posedge clk) if (rst_n) begin
    if (frame_accepted) m_acc++;
    if (frame_discarded) m_disc++;
    if (late_drop) m_late++;
    if (uc_new_packet) m_new++;
    if (tmr_fire) begin
      m_fire++;
      chk(tmr_fire_id == 8'd7, "timer event id");
    end
    if (dut.flush) m_flush++;
    if (dut.push && dut.in_w.sof) begin
      if (mii_mode) m_mii++; else m_gmii++;
    end
    if (dut.cc_run || dut.u_cc.started) begin
      foreach (visit_names[i]) if (dut.pc == lab[visit_names[i]] && pc_q != dut.pc) m_visit[visit_names[i]]++;
    end
    pc_q <= dut.pc;
    // CMAA latency, new packet instruction to packet-ready
    if (dut.cm_v && dut.cm_i.op == CI_NEW_PKT) begin
      lat_run = 1; lat = 0; lat_l4 = dut.cm_i.cfg[6];
    end else if (lat_run) lat++;
    if (dut.cm_ready && !rdy_q && lat_run) begin
      lat_run = 0;
      if (dut.cm_frag_old) begin
        m_plue_hit++;
        chk(lat == 4, $sformatf("later fragment latency %0d, expected 4", lat));
      end else begin
        // a miss has no pointer to store and is reported one cycle before a hit
        if (dut.cm_disc) begin
          m_slue_miss++;
          chk(lat == 8, $sformatf("unknown connection latency %0d, expected 8", lat));
        end else begin
          m_slue_hit++;
          chk(lat == 9, $sformatf("new IPv4 packet latency %0d, expected 9", lat));
        end
      end
      m_lat_ok++;
    end
    rdy_q <= dut.cm_ready;
  end

  // ---------------- stimulus ----------------
  // interface byte clock: every second core clock
  always @(posedge clk) rx_byte_en <= rst_n && !rx_byte_en;

  task automatic byte_slot();
    do @(negedge clk); while (!rx_byte_en);
  endtask
  task automatic send_gmii(bq_t f);
    mii_mode = 0;
    for (int i = 0; i < 8; i++) begin byte_slot(); gmii_rx_dv = 1; gmii_rxd = (i == 7) ? 8'hD5 : 8'h55; end
    foreach (f[i]) begin byte_slot(); gmii_rxd = f[i]; end
    byte_slot(); gmii_rx_dv = 0;
    repeat (12) byte_slot();
  endtask
  task automatic send_mii(bq_t f);
    mii_mode = 1;
    for (int i = 0; i < 8; i++) begin
      logic [7:0] b = (i == 7) ? 8'hD5 : 8'h55;
      byte_slot(); mii_rx_dv = 1; mii_rxd = b[3:0]; byte_slot(); mii_rxd = b[7:4];
    end
    foreach (f[i]) begin byte_slot(); mii_rxd = f[i][3:0]; byte_slot(); mii_rxd = f[i][7:4]; end
    byte_slot(); mii_rx_dv = 0;
    repeat (24) byte_slot();
    mii_mode = 0;
  endtask
  task automatic frame(bq_t f, bit acc, bit dest, bit mii = 0, bit decided = 1);
    expect_frame(f, acc, dest, decided);
    if (mii) send_mii(f); else send_gmii(f);
  endtask

  task automatic uc_cmaa(cmaa_op_e op, logic [7:0] cfg, logic [31:0] d0, logic [31:0] d1 = 0);
    @(negedge clk);
    uc_cmaa_valid = 1; uc_cmaa_instr = '{op: op, cfg: cfg}; uc_dbus0 = d0; uc_dbus1 = d1;
    @(negedge clk);
    uc_cmaa_valid = 0;
  endtask
  task automatic cfg(int page, int addr, logic [31:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_page = 3'(page); cfg_addr = 2'(addr); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // micro controller time base and one time-out
  initial begin
    @(posedge rst_n);
    forever begin repeat (9) @(negedge clk); tmr_tick = 1; @(negedge clk); tmr_tick = 0; end
  end

  initial begin
    bq_t f;
    int start_t;
    pass = 1; asm_prog(); pass = 2; asm_prog();
    repeat (3) @(negedge clk); rst_n = 1;
    // FP configuration: XAC0 compares the high 32 destination bits, XAC1 half-word 1
    // with the IPv4 type
    cfg(1, 0, 32'h02000000);
    cfg(2, 0, {16'h0800, 16'h0000}); cfg(2, 2, 32'h11);
    for (int i = 0; i < a; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0;
    // packet buffers, and one UDP connection 10.0.0.1:1234 -> 10.0.0.2:80
    uc_cmaa(CI_SET_BUF, 8'd0, 0, {12'd32, 20'h01000});
    uc_cmaa(CI_LOAD_REG, 8'd5, 32'd4);
    uc_cmaa(CI_LOAD_REG, 8'd0, {16'd1234, 16'd80});
    uc_cmaa(CI_LOAD_REG, 8'd1, 32'h0A000001);
    uc_cmaa(CI_LOAD_REG, 8'd2, 0); uc_cmaa(CI_LOAD_REG, 8'd3, 0);
    uc_cmaa(CI_LOAD_REG, 8'd4, 32'h0A000002);
    uc_cmaa(CI_PA_CAM, {6'd0, LUE_WRITE}, {6'b000000, 6'd0, 20'h2A000});
    // a time-out of 20 ticks
    @(negedge clk); tmr_ins = 1; tmr_id = 8'd7; tmr_delay = 16'd20; @(negedge clk); tmr_ins = 0;
    @(negedge clk); cc_run = 1; @(negedge clk); cc_run = 0;
    repeat (20) @(negedge clk);

    // F1  known UDP connection, not fragmented: to host
    frame(fcs_append(ipv4(16'h0101, 16'h0000, 1234, 80, 26, 1)), 1, 0);
    // F2  other destination address: XAC0 rejects
    frame(fcs_append(ipv4(16'h0102, 16'h0000, 1234, 80, 26, 1, 0, 0, {32'h02000000, 16'h0002})), 0, 0);
    frame(fcs_append(ipv4(16'h0103, 16'h0000, 1234, 80, 26, 1, 0, 0, {32'h03000000, 16'h0001})), 0, 0);
    // F3  CRC error
    frame(fcs_append(ipv4(16'h0104, 16'h0000, 1234, 80, 26, 1), 1), 0, 0);
    // F4  ARP: to the control memory
    frame(fcs_append(other(16'h0806, 64)), 1, 1);
    // F5  unknown protocol type
    frame(fcs_append(other(16'h86DD, 64)), 0, 0);
    // F6  unknown connection: SLUE miss
    frame(fcs_append(ipv4(16'h0105, 16'h0000, 1234, 81, 26, 1)), 0, 0);
    // F7  first fragment of a new packet, F8 a later fragment of it
    frame(fcs_append(ipv4(16'h0777, 16'h2000, 1234, 80, 26, 1)), 1, 0);
    frame(fcs_append(ipv4(16'h0777, 16'h0003, 0, 0, 26, 0)), 1, 0);
    // F9  header checksum error
    frame(fcs_append(ipv4(16'h0106, 16'h0000, 1234, 80, 26, 1, 0, 1)), 0, 0);
    // F10 total length disagrees with the frame length
    frame(fcs_append(ipv4(16'h0107, 16'h0000, 1234, 80, 26, 1, -2)), 0, 0);
    // F11 known connection over MII
    frame(fcs_append(ipv4(16'h0108, 16'h0000, 1234, 80, 26, 1)), 1, 0, 1);
    // F12 a frame longer than the chain while the program waits for its CRC: the
    // decision comes after its first word left the chain, so it is dropped as late
    frame(fcs_append(ipv4(16'h0109, 16'h0000, 1234, 80, 58, 1)), 0, 0, 0, 0);
    n_dec_acc_exp++;   // its (late) decision is still an accept
    // F13 back to normal
    frame(fcs_append(ipv4(16'h010A, 16'h0000, 1234, 80, 26, 1)), 1, 0);
    repeat (200) @(negedge clk);

    // micro controller reads the variable the C&C wrote into F1's packet buffer
    start_t = 0;
    @(negedge clk); uc_cm_req = 1; uc_cm_we = 0; uc_cm_addr = 20'h01001; #1;
    chk(uc_cm_gnt, "micro controller has the control memory between packets");
    @(negedge clk); uc_cm_req = 0;
    chk(cm_rdata == {16'd1234, 16'd80}, $sformatf("packet variable %h", cm_rdata));
    // and the connection pointer the CMAA stored there
    @(negedge clk); uc_cm_req = 1; uc_cm_addr = 20'h01000; @(negedge clk); uc_cm_req = 0;
    chk(cm_rdata == 32'h2A000, $sformatf("connection pointer in packet buffer %h", cm_rdata));

    chk(exp_q.size() == 0, $sformatf("%0d accepted frames not delivered", exp_q.size()));
    chk(m_acc == n_dec_acc_exp, $sformatf("accept decisions %0d, expected %0d", m_acc, n_dec_acc_exp));
    chk(m_disc == n_dec_disc_exp, $sformatf("discard decisions %0d, expected %0d", m_disc, n_dec_disc_exp));
    chk(m_late == 1, $sformatf("late drops %0d", m_late));
    chk(m_new == 9, $sformatf("new-packet flags %0d", m_new));

    // every mechanism must have happened
    $display("mechanisms: gmii=%0d mii=%0d accept=%0d discard=%0d host_words=%0d cm_words=%0d late=%0d",
             m_gmii, m_mii, m_acc, m_disc, m_pay_host, m_pay_cm, m_late);
    $display("mechanisms: plue_hit=%0d slue_hit=%0d slue_miss=%0d uc_new_packet=%0d timer=%0d flush=%0d",
             m_plue_hit, m_slue_hit, m_slue_miss, m_new, m_fire, m_flush);
    foreach (visit_names[i]) $display("mechanisms: path %s = %0d", visit_names[i], m_visit[visit_names[i]]);
    chk(m_gmii > 0, "mechanism: GMII reception");
    chk(m_mii > 0, "mechanism: MII parallelization FP");
    chk(m_frames_ok > 0 && m_pay_host > 0, "mechanism: payload to host memory");
    chk(m_pay_cm > 0, "mechanism: payload to control memory");
    chk(m_acc > 0, "mechanism: accept");
    chk(m_disc > 0, "mechanism: discard");
    chk(m_visit["DROP_DA"] > 0, "mechanism: extract-and-compare address check");
    chk(m_visit["IP"] > 0 && m_visit["ARP"] > 0 && m_visit["DROP_TYPE"] > 0, "mechanism: four-way jump");
    chk(m_visit["DROP_CS"] > 0, "mechanism: checksum FP");
    chk(m_visit["DROP_CRC"] > 0, "mechanism: CRC FP");
    chk(m_visit["DROP_LEN"] > 0, "mechanism: length counter FP");
    chk(m_visit["DROP_CM"] > 0 && m_slue_miss > 0, "mechanism: SLUE miss (unknown connection)");
    chk(m_slue_hit > 0, "mechanism: SLUE hit (connection pointer)");
    chk(m_plue_hit > 0, "mechanism: PLUE hit (later fragment)");
    chk(m_visit["FIRST"] > 0 && m_visit["UNFRAG"] > 0, "mechanism: new packet, fragmented and not");
    chk(m_new > 0, "mechanism: new-packet flag to micro controller");
    chk(m_fire > 0, "mechanism: hardware timer");
    chk(m_late > 0, "mechanism: late decision drop");
    chk(m_flush > 0, "mechanism: chain drain between frames");
    chk(m_lat_ok > 0, "mechanism: CMAA latency measured");
    finish_tb();
  end
endmodule
