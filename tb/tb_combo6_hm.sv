// tb_combo6_hm: end-to-end test of the header matching engine at its default
// parameters, with behavioural models of the CAM and the SRAM.
//
// A small look-up program is loaded: a root CAM step on header words 0 and 1,
// a chain of the six comparison instructions behind one CAM row, a second CAM
// level on word 4 that is a four-entry prefix table (global mask register 1
// plus per-row don't-care bits, longest prefix first), a duplicate row that must
// lose to a lower-numbered one, a row in the second CAM half and a default
// (miss) path. Four extractor processes write headers into the four buffers;
// a replicator process reads the output queue. Every entry is compared with
// a reference computed here from the header fields alone.
//
// Phases: (1) single headers on an idle engine, checking the cycle counts of a
// CAM step (3 rounds of 40 ns) and of each further instruction (one round);
// (2) random traffic on all interfaces, CAM half 0; (3) the same with CAM half
// 1 selected; (3b) CAM half switched while traffic flows; (4) output queue
// overflow with the replicator stopped.
// Mechanisms counted, each must occur: CAM wait, hit, miss, multiple match,
// second CAM level, each prefix route, each comparison true and false,
// back-to-back headers, extractor stalled by a full buffer, CAM half 1, queue
// overflow.
module tb_combo6_hm;
  import hm_pkg::*;

  localparam int unsigned KW  = CAM_DQ_W * CAM_BEATS;
  localparam int unsigned B   = CAM_SRAM_BASE;
  localparam int          NRND = 120;          // random headers per interface and phase

  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;

  logic [INSN_W-1:0]               cfg_root;
  logic                            cfg_bank;
  logic [N_LUP-1:0]                ext_wr_en, ext_wr_done;
  logic [N_LUP-1:0][1:0]           ext_wr_set;
  logic [N_LUP-1:0][SET_AW-1:0]    ext_wr_addr;
  logic [N_LUP-1:0][BUF_DW-1:0]    ext_wr_data;
  logic [N_LUP-1:0][N_SETS-1:0]    ext_set_full;
  logic                            cam_opv, cam_mv, cam_mf, cam_mm;
  logic [CAM_DQ_W-1:0]             cam_dq;
  logic [CAM_MASK_W-1:0]           cam_mask_idx;
  logic [CAM_IDX_W-1:0]            cam_idx;
  logic [SRAM_AW-1:0]              sram_a;
  logic [INSN_W-1:0]               sram_q;
  logic                            rep_valid, rep_ready, oq_overflow, cam_busy;
  rep_entry_t                      rep_entry;
  logic [1:0]                      rep_src, slot;
  logic [15:0]                     oq_dropped;
  logic                            phase;
  lup_state_e [N_LUP-1:0]          lup_state;

  combo6_hm dut (.*);

  cam_model u_cam (.clk, .opv(cam_opv), .dq(cam_dq), .mask_idx(cam_mask_idx),
                   .mv(cam_mv), .mf(cam_mf), .mm(cam_mm), .idx(cam_idx));
  sram_model u_sram (.a(sram_a), .q(sram_q));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------
  // program
  // ------------------------------------------------------------------
  function automatic logic [KW-1:0] key1(input bit bank, input logic [31:0] w0,
                                         input logic [31:0] w1);
    logic [KW-1:0] k = '0;
    for (int b = 0; b < CAM_BEATS; b++) k[CAM_DQ_W*b + 33] = bank;
    k[0 +: 34]  = {bank, 1'b1, w0};
    k[34 +: 34] = {bank, 1'b1, w1};
    return k;
  endfunction

  // care: beat 0 fully, the bank/marker bits of beat 1, and the padding beats
  function automatic logic [KW-1:0] care1();
    logic [KW-1:0] c = '0;
    c[0 +: 34]  = '1;
    c[34+32 +: 2] = 2'b11;
    for (int b = 2; b < CAM_BEATS; b++) c[CAM_DQ_W*b +: CAM_DQ_W] = '1;
    return c;
  endfunction

  // one-word row on beat 0 that cares for the first plen bits of the word;
  // beat 1 onwards carry marker 0 (words not loaded)
  task automatic write_prefix(input int row, input logic [31:0] w, input int plen);
    logic [KW-1:0] v, c;
    v = '0;
    v[0 +: 34] = {1'b0, 1'b1, w};
    c = '1;
    for (int i = 0; i < 32 - plen; i++) c[i] = 1'b0;
    u_cam.write_row(row, v, c);
  endtask

  task automatic load_program();
    logic [KW-1:0] g;
    // root: CAM on words 0 and 1, miss -> 0 + 2
    cfg_root = mk_cam(3'd0, 3'd0, 16'h0003);
    u_sram.write_word(2, mk_exe(32'h0000_DEAD));
    // row 0: w0 == 6 -> comparison chain
    u_cam.write_row(0,  key1(1'b0, 32'd6, '0), care1());
    u_cam.write_row(40, key1(1'b0, 32'd6, '0), care1());     // duplicate, loses
    u_sram.write_word(B + 40, mk_exe(32'h0000_0BAD));
    u_sram.write_word(B + 0,  mk_cmp(OP_GE, 5'd2, 3'd0, 2'b11, 16'h0400));
    u_sram.write_word(B + 1,  mk_exe(32'h101));
    u_sram.write_word(B + 2,  mk_cmp(OP_EQ, 5'd3, 3'd0, 2'b01, 16'h0050));
    u_sram.write_word(B + 3,  mk_exe(32'h103));
    u_sram.write_word(B + 4,  mk_cmp(OP_NE, 5'd3, 3'd0, 2'b11, 16'h1150));
    u_sram.write_word(B + 5,  mk_exe(32'h105));
    u_sram.write_word(B + 6,  mk_cmp(OP_GT, 5'd2, 3'd0, 2'b11, 16'h0800));
    u_sram.write_word(B + 7,  mk_exe(32'h107));
    u_sram.write_word(B + 8,  mk_cmp(OP_LT, 5'd2, 3'd0, 2'b11, 16'h4000));
    u_sram.write_word(B + 9,  mk_exe(32'h109));
    u_sram.write_word(B + 10, mk_cmp(OP_LE, 5'd3, 3'd1, 2'b10, 16'h2000));
    u_sram.write_word(B + 11, mk_exe(32'h10B));
    u_sram.write_word(B + 12, mk_exe(32'h0BAD));
    u_sram.write_word(B + 13, mk_exe(32'h0BAD));
    u_sram.write_word(B + 14, mk_exe(32'h10E));
    // row 32: w0 == 0x11 -> second CAM level on word 4, mask register 1
    u_cam.write_row(32, key1(1'b0, 32'h11, '0), care1());
    u_sram.write_word(B + 32, mk_cam(3'd1, 3'd1, 16'h0010));
    u_sram.write_word(B + 36, mk_exe(32'h224));                // level-2 miss
    // a small routing table on word 4: mask register 1 ignores the last
    // byte, per-row don't-care bits shorten the prefix further. The first
    // matching row wins, so longer prefixes come first
    write_prefix(44, 32'hC0A8_0100, 24);                       // 192.168.1/24
    u_sram.write_word(B + 44, mk_exe(32'h234));
    write_prefix(48, 32'hC0A8_00FF, 32);                       // 192.168.0/24
    u_sram.write_word(B + 48, mk_exe(32'h230));
    write_prefix(52, 32'hC0A8_0000, 16);                       // 192.168/16
    u_sram.write_word(B + 52, mk_exe(32'h238));
    write_prefix(56, 32'hC000_0000, 8);                        // 192/8
    u_sram.write_word(B + 56, mk_exe(32'h23C));
    g = '1; g[7:0] = '0;
    u_cam.write_mask(1, g);
    // row 2048: second CAM half, w0 == 6
    u_cam.write_row(2048, key1(1'b1, 32'd6, '0), care1());
    u_sram.write_word(B + 2048, mk_exe(32'h800));
  endtask

  // reference
  function automatic logic [31:0] expect_prog(input bit bank, input logic [31:0] w0,
                                              input logic [31:0] w1, input logic [31:0] w4);
    logic [15:0] r2, r3;
    r2 = w1[15:0];
    r3 = w1[31:16];
    if (bank) return (w0 == 32'd6) ? 32'h800 : 32'hDEAD;
    if (w0 == 32'h11) begin
      if (w4[31:8]  == 24'hC0A801) return 32'h234;
      if (w4[31:8]  == 24'hC0A800) return 32'h230;
      if (w4[31:16] == 16'hC0A8)   return 32'h238;
      if (w4[31:24] == 8'hC0)      return 32'h23C;
      return 32'h224;
    end
    if (w0 != 32'd6)  return 32'hDEAD;
    if (!(r2 >= 16'h0400))              return 32'h101;
    if ((r3 & 16'h00FF) != 16'h0050)    return 32'h103;
    if (!(r3 != 16'h1150))              return 32'h105;
    if (!(r2 > 16'h0800))               return 32'h107;
    if (!(r2 < 16'h4000))               return 32'h109;
    if (!((r3 & 16'hFF00) <= 16'h2000)) return 32'h10B;
    return 32'h10E;
  endfunction

  // ------------------------------------------------------------------
  // extractors
  // ------------------------------------------------------------------
  rep_entry_t exp_q [N_LUP][$];
  logic [31:0] alt_q [N_LUP][$];    // other acceptable answer (0 = none)
  bit         flipping = 1'b0;      // CAM half being toggled: either half is right
  int         n_flip_old = 0, n_flip_new = 0;
  int         sent [N_LUP];
  int         n_stall = 0;
  logic [1:0] wset [N_LUP];
  int         hdr_seq = 0;

  task automatic send_header(input int k, input logic [31:0] w0, input logic [31:0] w1,
                             input logic [31:0] w4);
    logic [15:0] id;
    rep_entry_t  e;
    bit          stalled = 0;
    id = 16'({k[1:0], 14'(sent[k])});
    // driven at the falling edge with blocking assignments, so that the four
    // extractor processes never race with each other or with the design
    @(negedge clk);
    while (ext_set_full[k][wset[k]]) begin
      stalled = 1;
      @(negedge clk);
    end
    if (stalled) n_stall++;
    for (int w = 0; w <= UH_ID_WORD; w++) begin
      ext_wr_en[k]   = 1'b1;
      ext_wr_set[k]  = wset[k];
      ext_wr_addr[k] = SET_AW'(w);
      ext_wr_data[k] = (w == 0) ? w0 : (w == 1) ? w1 : (w == 4) ? w4 :
                       (w == UH_ID_WORD) ? {16'h0, id} : $urandom();
      @(negedge clk);
    end
    ext_wr_en[k]   = 1'b0;
    ext_wr_done[k] = 1'b1;
    e.id   = id;
    e.prog = expect_prog(cfg_bank, w0, w1, w4);
    exp_q[k].push_back(e);
    alt_q[k].push_back(flipping ? expect_prog(!cfg_bank, w0, w1, w4) : 32'h0);
    sent[k]++;
    @(negedge clk);
    ext_wr_done[k] = 1'b0;
    wset[k] = wset[k] + 2'd1;
  endtask

  function automatic logic [31:0] pick_w0();
    case ($urandom_range(9))
      0, 1, 2, 3, 4, 5: return 32'd6;
      6, 7:             return 32'h11;
      8:                return 32'h99;
      default:          return $urandom();
    endcase
  endfunction

  function automatic logic [31:0] pick_w1();
    logic [15:0] r2, r3;
    case ($urandom_range(7))
      0: r2 = 16'h0100; 1: r2 = 16'h0400; 2: r2 = 16'h0801; 3: r2 = 16'h0800;
      4: r2 = 16'h3FFF; 5: r2 = 16'h4000; 6: r2 = 16'h1234; default: r2 = 16'($urandom());
    endcase
    case ($urandom_range(5))
      0: r3 = 16'h1150; 1: r3 = 16'h2050; 2: r3 = 16'h2150; 3: r3 = 16'h1050;
      4: r3 = 16'h0050; default: r3 = 16'($urandom());
    endcase
    return {r3, r2};
  endfunction

  function automatic logic [31:0] pick_w4();
    case ($urandom_range(6))
      0: return 32'hC0A8_0001;
      1: return 32'hC0A8_00FE;
      2: return 32'hC0A8_0101;
      3: return 32'hC0A8_7F01;
      4: return 32'hC011_0001;
      5: return 32'h0A00_0001;
      default: return $urandom();
    endcase
  endfunction

  // ------------------------------------------------------------------
  // replicator side
  // ------------------------------------------------------------------
  int  received = 0;
  int  n_route [4];                 // answers 0x230 .. 0x23C of the routing table
  bit  rep_random = 1'b1;
  bit  rep_stop = 1'b0;

  always @(posedge clk) begin
    if (rst_n && rep_valid && rep_ready) begin
      received++;
      if (exp_q[rep_src].size() == 0) begin
        check(0, $sformatf("unexpected output id=%h prog=%h from %0d",
                           rep_entry.id, rep_entry.prog, rep_src));
      end else begin
        rep_entry_t e;
        logic [31:0] alt;
        e = exp_q[rep_src].pop_front();
        alt = alt_q[rep_src].pop_front();
        if (alt != 0 && alt != e.prog) begin
          // started around the switch: one half or the other, never a mix
          if (rep_entry.prog == e.prog) n_flip_old++;
          if (rep_entry.prog == alt) begin n_flip_new++; e.prog = alt; end
        end
        check(e.id == rep_entry.id && e.prog == rep_entry.prog,
              $sformatf("if%0d: got id=%h prog=%h, expected id=%h prog=%h", rep_src,
                        rep_entry.id, rep_entry.prog, e.id, e.prog));
        if (rep_entry.prog[31:4] == 28'h23) n_route[rep_entry.prog[3:2]]++;
      end
    end
    rep_ready <= rep_stop ? 1'b0 : (rep_random ? ($urandom_range(9) < 8) : 1'b1);
  end

  // ------------------------------------------------------------------
  // monitors: mechanisms, mutual exclusion, CAM wait bound
  // ------------------------------------------------------------------
  int n_wait = 0, n_hit = 0, n_miss = 0, n_mm = 0, n_l2 = 0, n_b2b = 0, n_bank1 = 0;
  int n_true [8], n_false [8];
  int wait_len [N_LUP];
  int max_wait = 0;
  lup_state_e prev_state [N_LUP];

  always @(posedge clk) begin
    int loading;
    if (rst_n) begin
      loading = 0;
      for (int k = 0; k < N_LUP; k++) begin
        if (lup_state[k] == S_LOAD) loading++;
        if (lup_state[k] == S_WAIT) begin
          wait_len[k]++;
          if (prev_state[k] != S_WAIT) n_wait++;
        end else begin
          if (wait_len[k] > max_wait) max_wait = wait_len[k];
          wait_len[k] = 0;
        end
        prev_state[k] <= lup_state[k];
      end
      if (loading > 1) check(0, "two processors load the CAM at once");
      if (cam_mv) begin
        if (cam_mf) n_hit++; else n_miss++;
        if (cam_mm) n_mm++;
      end
      if (cam_opv && cam_dq[33]) n_bank1++;
    end
  end

  for (genvar k = 0; k < N_LUP; k++) begin : g_cmp_mon
    always @(posedge clk) begin
      // a CAM step out of a COMP round: from the program (second level) or
      // the root step of a new header straight after EXE
      if (rst_n && dut.g_if[k].u_lup.cyc == 3'd7 && lup_state[k] == S_COMP) begin
        if (dut.g_if[k].u_lup.insn[35:32] == OP_CAM) n_l2++;
        else if (dut.g_if[k].u_lup.insn[35:32] == OP_EXE && dut.g_if[k].u_lup.start_new) n_b2b++;
      end
      if (rst_n && lup_state[k] == S_COMP && dut.g_if[k].u_lup.cyc == 3'd1 &&
          is_cmp(dut.g_if[k].u_lup.insn[35:32])) begin
        if (cmp_true(dut.g_if[k].u_lup.insn[35:32], dut.g_if[k].u_lup.reg_val &
                     dut.g_if[k].u_lup.mask16, dut.g_if[k].u_lup.insn[15:0]))
          n_true[dut.g_if[k].u_lup.insn[34:32]]++;
        else
          n_false[dut.g_if[k].u_lup.insn[34:32]]++;
      end
    end
  end

  // ------------------------------------------------------------------
  // helpers
  // ------------------------------------------------------------------
  function automatic bit engine_idle();
    for (int k = 0; k < N_LUP; k++)
      if (lup_state[k] != S_SLEEP || ext_set_full[k] != '0) return 0;
    return 1;
  endfunction

  task automatic drain();
    int guard = 0;
    repeat (20) @(posedge clk);
    while (!(engine_idle() && !rep_valid) && guard < 200000) begin
      @(posedge clk);
      guard++;
    end
    repeat (4) @(posedge clk);
  endtask

  // cycles from the first LOAD cycle of interface 0 to its REPWrite
  task automatic timed(input logic [31:0] w0, input logic [31:0] w1, input logic [31:0] w4,
                       input int expect_cycles, input string what);
    int t_load, t_rep, t;
    t_load = -1; t_rep = -1; t = 0;
    fork
      send_header(0, w0, w1, w4);
      begin
        while (t_rep < 0 && t < 2000) begin
          @(posedge clk);
          t++;
          if (t_load < 0 && lup_state[0] == S_LOAD) t_load = t;
          if (dut.g_if[0].u_lup.REPWrite) t_rep = t;
        end
      end
    join
    check(t_load >= 0 && t_rep - t_load == expect_cycles,
          $sformatf("%s: LOAD to REPWrite %0d cycles, expected %0d", what, t_rep - t_load,
                    expect_cycles));
    drain();
  endtask

  // ------------------------------------------------------------------
  // stimulus
  // ------------------------------------------------------------------
  initial begin
    cfg_bank    = 1'b0;
    cfg_root    = '0;
    ext_wr_en   = '0;
    ext_wr_done = '0;
    ext_wr_set  = '0;
    ext_wr_addr = '0;
    ext_wr_data = '0;
    rep_ready   = 1'b0;
    for (int k = 0; k < N_LUP; k++) begin
      sent[k] = 0; wset[k] = '0; wait_len[k] = 0; prev_state[k] = S_SLEEP;
    end
    for (int i = 0; i < 8; i++) begin n_true[i] = 0; n_false[i] = 0; end
    for (int r = 0; r < 4; r++) n_route[r] = 0;
    load_program();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // (1) latencies on an idle engine: CAM step = 3 rounds, then one round
    // per instruction, the output written in the third cycle of the EXE round
    timed(32'h99, 32'h0, 32'h0, 3*8 + 2, "root miss, EXE");
    timed(32'd6, 32'h0000_0100, 32'h0, 4*8 + 2, "CAM hit, 1 compare, EXE");
    timed(32'd6, 32'h2050_0801, 32'h0, 9*8 + 2, "CAM hit, 6 compares, EXE");
    timed(32'h11, 32'h0, 32'hC0A8_0001, 7*8 + 2, "two CAM levels, EXE");

    // (2) random traffic, CAM half 0
    fork
      for (int k = 0; k < N_LUP; k++) begin
        automatic int kk = k;
        fork
          for (int n = 0; n < NRND; n++) begin
            repeat ($urandom_range(3)) @(posedge clk);
            send_header(kk, pick_w0(), pick_w1(), pick_w4());
          end
        join_none
      end
    join
    wait fork;
    drain();

    // (3) switch to CAM half 1 (atomic: only headers started later use it)
    cfg_bank = 1'b1;
    fork
      for (int k = 0; k < N_LUP; k++) begin
        automatic int kk = k;
        fork
          for (int n = 0; n < NRND / 4; n++) begin
            send_header(kk, pick_w0(), pick_w1(), pick_w4());
          end
        join_none
      end
    join
    wait fork;
    drain();
    cfg_bank = 1'b0;

    // (3b) toggle the CAM half every 97 cycles while traffic flows. Each
    // header must use one half for all its CAM steps: a walk whose first
    // level ran in half 0 and whose second level ran in half 1 would miss
    // there and give 0x224, which matches neither half
    flipping = 1'b1;
    fork
      begin
        for (int k = 0; k < N_LUP; k++) begin
          automatic int kk = k;
          fork
            for (int n = 0; n < NRND / 2; n++)
              send_header(kk, ($urandom_range(3) != 0) ? 32'h11 : 32'd6, pick_w1(),
                          32'hC0A8_0001);
          join_none
        end
        wait fork;
        flipping = 1'b0;
      end
      while (flipping) begin
        repeat (97) @(negedge clk);
        if (flipping) cfg_bank = !cfg_bank;
      end
    join
    drain();
    cfg_bank = 1'b0;
    repeat (2) @(posedge clk);
    $display("half toggling: %0d headers used the half set when written, %0d the other", n_flip_old, n_flip_new);
    check(n_flip_old > 0 && n_flip_new > 0,
          $sformatf("CAM half toggled under traffic: %0d headers used the half set when written, %0d the other",
                    n_flip_old, n_flip_new));

    // (4) output queue overflow: replicator stopped, 20 headers on interface 0
    rep_stop = 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 20; n++) send_header(0, 32'h99, 32'h0, 32'h0);
    drain();
    check(oq_overflow == 1'b1, "output queue overflow flag");
    check(oq_dropped == 16'd4, $sformatf("output queue dropped %0d, expected 4", oq_dropped));
    // the four newest are lost; the rest must come out in order
    for (int n = 0; n < 4; n++) void'(exp_q[0].pop_back());
    rep_stop = 1'b0;
    drain();

    // end of test
    for (int k = 0; k < N_LUP; k++)
      check(exp_q[k].size() == 0, $sformatf("if%0d: %0d outputs missing", k, exp_q[k].size()));
    check(max_wait <= 24, $sformatf("longest CAM wait %0d cycles, bound 24 (120 ns)", max_wait));
    check(n_wait  > 0, "mechanism: CAM wait");
    check(n_hit   > 0, "mechanism: CAM hit");
    check(n_miss  > 0, "mechanism: CAM miss");
    check(n_mm    > 0, "mechanism: CAM multiple match");
    check(n_l2    > 0, "mechanism: second CAM level");
    $display("routes: /24 .0 %0d, /24 .1 %0d, /16 %0d, /8 %0d", n_route[0], n_route[1], n_route[2], n_route[3]);
    for (int r = 0; r < 4; r++)
      check(n_route[r] > 0, $sformatf("mechanism: route %0d of the prefix table", r));
    check(n_b2b   > 0, "mechanism: next header straight after EXE");
    check(n_stall > 0, "mechanism: extractor stalled by full buffer");
    check(n_bank1 > 0, "mechanism: CAM half 1");
    for (int i = 0; i < 6; i++) begin
      check(n_true[i]  > 0, $sformatf("mechanism: comparison %0d true", i));
      check(n_false[i] > 0, $sformatf("mechanism: comparison %0d false", i));
    end
    $display("received=%0d waits=%0d max_wait=%0d hits=%0d misses=%0d mm=%0d l2=%0d b2b=%0d stalls=%0d bank1_beats=%0d",
             received, n_wait, max_wait, n_hit, n_miss, n_mm, n_l2, n_b2b, n_stall, n_bank1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
