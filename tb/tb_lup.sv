// tb_lup: one look-up processor (rank 1) with its Unified-header buffer, the
// slot timer, and behavioural CAM and SRAM; the testbench plays the CAM
// arbiter (granting CAMAck at random) and the SRAM slot multiplexer.
//
// A small program is loaded: a root CAM step on word 0, a comparison behind
// one CAM row, a second CAM level on word 2 behind another, and a default
// path for a miss. Headers are written in random order of content; each
// output (packet identification, Queue) is compared with a reference computed
// from the header. With every CAM request granted, the cycle counts from the
// first LOAD cycle to REPWrite are checked: 3 rounds of 8 cycles for a CAM
// step, one round per further instruction. Headers started while cfg_bank = 1
// use the other CAM half, where no row is written, and must take the default.
module tb_lup;
  import hm_pkg::*;
  localparam int unsigned KW = CAM_DQ_W * CAM_BEATS;
  localparam int unsigned B  = CAM_SRAM_BASE;
  localparam logic [1:0] RANK = 2'd1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2.5 clk = ~clk;

  logic [1:0] slot;
  logic phase, slot_end;
  logic [INSN_W-1:0] cfg_root;
  logic cfg_bank;
  logic [BUF_AW-1:0] Adr;
  logic [BUF_DW-1:0] Data;
  logic Ready, Free;
  logic CAMRq, CAMAck, OPV, MF, MM, MV;
  logic [CAM_DQ_W-1:0] DQ;
  logic [CAM_MASK_W-1:0] MaskIdx;
  logic [CAM_IDX_W-1:0] CAMIdx;
  logic [SRAM_AW-1:0] SRAMAdr;
  logic [SRAM_HW-1:0] SRAMData;
  logic SRAMAck;
  logic [REP_DW-1:0] REPData;
  logic [REP_AW-1:0] REPDRAMAddr;
  logic REPWrite;
  lup_state_e state;
  logic wr_en = 0, wr_done = 0;
  logic [1:0] wr_set = 0;
  logic [SET_AW-1:0] wr_addr = 0;
  logic [BUF_DW-1:0] wr_data = 0;
  logic [N_SETS-1:0] set_full;
  logic [INSN_W-1:0] sram_q;
  int grant_pct = 100;

  slot_timer u_t (.clk, .rst_n, .slot, .phase, .slot_end);
  uh_buffer u_buf (.clk, .rst_n, .wr_en, .wr_set, .wr_addr, .wr_data, .wr_done,
                   .set_full, .Adr, .Data, .Ready, .Free);
  lup #(.RANK(RANK)) dut (.Clk(clk), .*);
  cam_model u_cam (.clk, .opv(OPV), .dq(DQ), .mask_idx(MaskIdx), .mv(MV), .mf(MF),
                   .mm(MM), .idx(CAMIdx));
  sram_model u_sram (.a(SRAMAdr), .q(sram_q));

  // SRAM slot and CAM grant as the multiplexer and the arbiter would give them
  assign SRAMAck  = (slot == RANK);
  assign SRAMData = !SRAMAck ? '0 : phase ? sram_q[17:0] : sram_q[35:18];
  logic grant_roll;
  always @(negedge clk) if (phase == 1'b0) grant_roll = ($urandom_range(99) < grant_pct);
  assign CAMAck = CAMRq && grant_roll;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [KW-1:0] key(input logic [31:0] w);
    logic [KW-1:0] k = '0;
    k[0 +: 34] = {1'b0, 1'b1, w};
    return k;
  endfunction

  function automatic logic [31:0] expect_prog(input bit bank, input logic [31:0] w0,
                                              input logic [31:0] w1, input logic [31:0] w2);
    if (bank) return 32'hD0;
    if (w0 == 32'd6)  return (w1[15:0] < 16'h0100) ? 32'hA2 : 32'hA1;
    if (w0 == 32'h11) return (w2 == 32'h1234_5678) ? 32'hC1 : 32'hC0;
    return 32'hD0;
  endfunction

  rep_entry_t exp_q[$];
  int exp_lat[$];
  int nsent = 0, nwait = 0, nrecv = 0;
  logic [1:0] wset = 0;

  task automatic send(input logic [31:0] w0, input logic [31:0] w1, input logic [31:0] w2,
                      input int lat);
    rep_entry_t e;
    @(negedge clk);
    while (set_full[wset]) @(negedge clk);
    for (int w = 0; w <= UH_ID_WORD; w++) begin
      wr_en = 1; wr_set = wset; wr_addr = SET_AW'(w);
      wr_data = (w == 0) ? w0 : (w == 1) ? w1 : (w == 2) ? w2 :
                (w == UH_ID_WORD) ? 32'(16'h7000 + 16'(nsent)) : $urandom();
      @(negedge clk);
    end
    wr_en = 0; wr_done = 1;
    e.id = 16'h7000 + 16'(nsent);
    e.prog = expect_prog(cfg_bank, w0, w1, w2);
    exp_q.push_back(e);
    exp_lat.push_back(lat);
    nsent++;
    @(negedge clk);
    wr_done = 0;
    wset = wset + 1;
  endtask

  // output check and latency measurement
  int t_load = -1, t = 0;
  always @(posedge clk) begin
    t++;
    if (state == S_WAIT) nwait++;
    if (state == S_LOAD && t_load < 0) t_load = t;
    if (REPWrite) begin
      rep_entry_t e;
      int lat;
      nrecv++;
      if (exp_q.size() == 0) check(0, "unexpected REPWrite");
      else begin
        e = exp_q.pop_front();
        lat = exp_lat.pop_front();
        check(REPDRAMAddr == e.id && REPData == e.prog,
              $sformatf("got id=%h prog=%h expected id=%h prog=%h", REPDRAMAddr, REPData, e.id, e.prog));
        if (lat > 0) check(t - t_load == lat, $sformatf("latency %0d expected %0d", t - t_load, lat));
      end
      t_load = -1;
    end
  end

  task automatic idle();
    repeat (10) @(posedge clk);
    while (state != S_SLEEP || set_full != '0) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  initial begin
    cfg_bank = 0;
    cfg_root = mk_cam(3'd1, 3'd0, 16'h0001);
    u_sram.write_word(4, mk_exe(32'hD0));
    u_cam.write_row(0, key(32'd6), '1);
    u_sram.write_word(B + 0, mk_cmp(OP_LT, 5'd2, 3'd0, 2'b11, 16'h0100));
    u_sram.write_word(B + 1, mk_exe(32'hA1));
    u_sram.write_word(B + 2, mk_exe(32'hA2));
    u_cam.write_row(8, key(32'h11), '1);
    u_sram.write_word(B + 8, mk_cam(3'd0, 3'd0, 16'h0004));
    u_sram.write_word(B + 10, mk_exe(32'hC0));
    u_cam.write_row(16, key(32'h1234_5678), '1);
    u_sram.write_word(B + 16, mk_exe(32'hC1));
    repeat (4) @(posedge clk);
    rst_n = 1;
    // timed, every request granted
    send(32'h99, 0, 0, 3*8 + 2);            idle();
    send(32'd6, 32'h0000_0050, 0, 4*8 + 2); idle();
    send(32'd6, 32'h0000_0150, 0, 4*8 + 2); idle();
    send(32'h11, 0, 32'h1234_5678, 7*8 + 2); idle();
    send(32'h11, 0, 32'h0BAD_BEEF, 7*8 + 2); idle();
    // random, grants withheld at random, headers back to back
    grant_pct = 50;
    for (int n = 0; n < 150; n++) begin
      logic [31:0] w0;
      case ($urandom_range(3))
        0: w0 = 32'd6; 1: w0 = 32'h11; 2: w0 = 32'h99; default: w0 = 32'd6;
      endcase
      if (n == 100) begin idle(); cfg_bank = 1; end
      send(w0, 32'($urandom_range(511)), ($urandom_range(1) == 1) ? 32'h1234_5678 : 32'h0BAD_BEEF, 0);
    end
    idle();
    check(exp_q.size() == 0, $sformatf("%0d outputs missing", exp_q.size()));
    check(nwait > 0, "WAIT state reached");
    check(set_full == '0, "all sets freed");
    $display("sent=%0d received=%0d wait_cycles=%0d", nsent, nrecv, nwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
