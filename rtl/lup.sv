// lup: look-up processor of one network interface.
//
// The processor walks the look-up program (a tree, or a finite automaton) for
// one Unified-header at a time, starting from the beginning for every header.
// The program is a sequence of 36-bit instructions (encoding in hm_pkg) of
// three kinds, as in the document:
//   CAM Step,List  - the registers chosen by the bit map List are loaded into
//                    the shared CAM; on a match the program continues at the
//                    SRAM word belonging to the matching CAM row, otherwise at
//                    PC + Step (the miss rule is this design's choice).
//   compare        - the register at Address is masked with Mask and compared
//                    with Constant (=, !=, >, <, >=, <=); if true the program
//                    jumps to PC + Step, else it goes to PC + 1. Both targets
//                    are formed while the comparison runs.
//   EXE Queue      - the packet identification and Queue are written to the
//                    output queue, the header's set is freed, and the
//                    processor starts over if another header is ready.
// The first level of every walk is a CAM step whose instruction comes from
// cfg_root (configuration written by the host) and counts as the word at
// address 0; a processor leaving SLEEP starts loading the CAM at once, as in
// the document's state model.
//
// Scheduling follows the document's model of the CAM/SRAM sharing: six states
// (SLEEP, WAIT, LOAD, LAT1, LAT2, COMP), changed only at the end of the
// processor's own 10 ns slot (slot == RANK), so each state lasts a round of 4
// slots. The SRAM is used only in the processor's slot in LAT2 and COMP. CAM
// access is asked for with CAMRq; CAMAck (from the arbiter) is sampled at the
// end of the own slot and leads to LOAD, otherwise to WAIT.
//
// Round timing, with cyc = 0..7 counting clock cycles from the start of slot
// RANK+1 (2 cycles per slot):
//   LOAD : one buffer word per cycle goes to the CAM on DQ with OPV, eight
//          34-bit beats = the 272-bit key; DQ[33] is the CAM half (bank) this
//          header uses, DQ[32] marks a real word (0 = padding beat). The first
//          word is read from the buffer in cyc 7 of the round before.
//   LAT2 : the CAM result (MV with MF and CAMIdx) is taken; in cyc 6/7 (own
//          SRAM slot) the next instruction is fetched as two 18-bit halves.
//   COMP : cyc 0 reads the register (or the packet identification), cyc 1
//          decides, cyc 2 writes the output queue and frees the set (EXE),
//          cyc 6/7 fetch the next instruction.
// Adr[6:5] are always 0: only words 0..16 of a 128-word set are used.
// So a compare instruction takes one round (40 ns), a CAM step three rounds
// (120 ns) plus any WAIT rounds.
//
// Port names are those of the document's interface figure. Added to it:
// rst_n, the time base (slot, phase), the CAM result index CAMIdx, the
// configuration inputs cfg_root and cfg_bank, and the state output. MM
// (multiple match) is not used: the CAM then reports its first matching row,
// which is the result the program wants.
module lup
  import hm_pkg::*;
#(
  parameter logic [1:0] RANK = 2'd0
) (
  input  logic                   Clk,
  input  logic                   rst_n,
  input  logic [1:0]             slot,
  input  logic                   phase,
  // configuration
  input  logic [INSN_W-1:0]      cfg_root,
  input  logic                   cfg_bank,
  // Unified-header buffer
  output logic [BUF_AW-1:0]      Adr,
  input  logic [BUF_DW-1:0]      Data,
  input  logic                   Ready,
  output logic                   Free,
  // CAM
  output logic                   CAMRq,
  input  logic                   CAMAck,
  output logic                   OPV,
  output logic [CAM_DQ_W-1:0]    DQ,
  output logic [CAM_MASK_W-1:0]  MaskIdx,
  input  logic                   MF,
  input  logic                   MM,
  input  logic                   MV,
  input  logic [CAM_IDX_W-1:0]   CAMIdx,
  // SRAM
  output logic [SRAM_AW-1:0]     SRAMAdr,
  input  logic [SRAM_HW-1:0]     SRAMData,
  input  logic                   SRAMAck,
  // output queue towards the replicator
  output logic [REP_DW-1:0]      REPData,
  output logic [REP_AW-1:0]      REPDRAMAddr,
  output logic                   REPWrite,
  // status
  output lup_state_e             state
);

  logic [2:0]          cyc;
  logic                step_pt;
  logic [INSN_W-1:0]   insn;
  logic [SRAM_AW-1:0]  pc, npc;
  logic [1:0]          set_idx;
  logic                bank;
  logic [15:0]         list_rem;
  logic                beat_real;
  logic                res_seen;
  logic [SRAM_HW-1:0]  fetch_hi;

  logic [3:0]          op;
  logic                start_new;     // a new header begins at this step point
  logic [15:0]         cam_list;      // List of the CAM step that may start
  logic [15:0]         list_src;      // bits still to be read
  logic [3:0]          first_word;
  logic                have_word;
  logic [15:0]         reg_val;
  logic [15:0]         mask16;

  assign cyc     = {2'(slot - RANK - 2'd1), phase};
  assign step_pt = (cyc == 3'd7);
  assign op      = insn[35:32];

  // ---------------------------------------------------------------
  // List bit map -> sequence of buffer word addresses
  // ---------------------------------------------------------------
  assign cam_list = (state == S_SLEEP || (state == S_COMP && op == OP_EXE))
                    ? cfg_root[15:0] : insn[15:0];
  assign list_src = (state == S_LOAD) ? list_rem : cam_list;

  always_comb begin
    first_word = '0;
    have_word  = 1'b0;
    for (int i = UH_WORDS - 1; i >= 0; i--) begin
      if (list_src[i]) begin
        first_word = 4'(i);
        have_word  = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------
  // buffer address
  // ---------------------------------------------------------------
  always_comb begin
    Adr = {set_idx, 3'b000, first_word};
    if (state == S_COMP && cyc == 3'd0) begin
      if (op == OP_EXE) Adr = {set_idx, 7'(UH_ID_WORD)};
      else              Adr = {set_idx, 3'b000, insn[31:28]};
    end
  end

  // selected 16-bit register and byte-lane mask of a compare
  assign reg_val = insn[27] ? Data[31:16] : Data[15:0];
  assign mask16  = {{8{insn[17]}}, {8{insn[16]}}};

  // ---------------------------------------------------------------
  // requests and strobes
  // ---------------------------------------------------------------
  assign start_new = (state == S_SLEEP || (state == S_COMP && op == OP_EXE)) && Ready;

  always_comb begin
    CAMRq = 1'b0;
    if (slot == RANK) begin
      CAMRq = start_new || state == S_WAIT || (state == S_COMP && op == OP_CAM);
    end
  end

  assign OPV     = (state == S_LOAD);
  assign DQ      = OPV ? {bank, beat_real, (beat_real ? Data : '0)} : '0;
  assign MaskIdx = insn[18:16];
  assign SRAMAdr = npc;

  // ---------------------------------------------------------------
  // state machine
  // ---------------------------------------------------------------
  always_ff @(posedge Clk) begin
    if (!rst_n) begin
      state       <= S_SLEEP;
      insn        <= '0;
      pc          <= '0;
      npc         <= '0;
      set_idx     <= '0;
      bank        <= 1'b0;
      list_rem    <= '0;
      beat_real   <= 1'b0;
      res_seen    <= 1'b0;
      fetch_hi    <= '0;
      Free        <= 1'b0;
      REPWrite    <= 1'b0;
      REPData     <= '0;
      REPDRAMAddr <= '0;
    end else begin
      Free     <= 1'b0;
      REPWrite <= 1'b0;

      // buffer words for the CAM key: one per cycle, from the last cycle of
      // the round before LOAD to the last but one cycle of LOAD
      if (state == S_LOAD || step_pt) begin
        beat_real <= have_word;
        list_rem  <= list_src & ~(16'(have_word) << first_word);
      end

      // SRAM fetch, upper half first
      if (SRAMAck && !phase) fetch_hi <= SRAMData;

      // CAM result, accepted only in LAT2 (the rounds of two processors'
      // LAT2 never overlap because their LOAD rounds do not)
      if (state == S_LAT2 && MV && !res_seen) begin
        res_seen <= 1'b1;
        if (MF) npc <= CAM_SRAM_BASE + SRAM_AW'(CAMIdx);
      end

      // instruction execution inside a COMP round
      if (state == S_COMP) begin
        if (cyc == 3'd1) begin
          if (is_cmp(op)) begin
            npc <= cmp_true(op, reg_val & mask16, insn[15:0])
                   ? pc + step_of(insn[26:24]) : pc + SRAM_AW'(1);
          end else if (op == OP_EXE) begin
            REPWrite    <= 1'b1;
            REPData     <= insn[31:0];
            REPDRAMAddr <= Data[REP_AW-1:0];
            Free        <= 1'b1;
          end else if (op != OP_CAM) begin
            npc <= pc + SRAM_AW'(1);          // undefined opcode: next word
          end
        end
        if (cyc == 3'd2 && op == OP_EXE) set_idx <= set_idx + 2'd1;
      end

      // state changes at the end of the own slot
      if (step_pt) begin
        unique case (state)
          S_SLEEP, S_WAIT: begin
            if (state == S_WAIT || start_new) begin
              if (state == S_SLEEP) begin
                insn <= cfg_root;
                pc   <= '0;
                bank <= cfg_bank;
              end
              state <= CAMAck ? S_LOAD : S_WAIT;
            end
          end
          S_LOAD: state <= S_LAT1;
          S_LAT1: begin
            state    <= S_LAT2;
            res_seen <= 1'b0;
            npc      <= pc + step_of(insn[26:24]);   // miss target
          end
          S_LAT2: begin
            state <= S_COMP;
            insn  <= {fetch_hi, SRAMData};
            pc    <= npc;
          end
          S_COMP: begin
            if (op == OP_CAM) begin
              state <= CAMAck ? S_LOAD : S_WAIT;
            end else if (op == OP_EXE) begin
              if (start_new) begin
                insn  <= cfg_root;
                pc    <= '0;
                bank  <= cfg_bank;
                state <= CAMAck ? S_LOAD : S_WAIT;
              end else begin
                state <= S_SLEEP;
              end
            end else begin
              insn <= {fetch_hi, SRAMData};
              pc   <= npc;
            end
          end
          default: state <= S_SLEEP;
        endcase
      end
    end
  end

  a_ack_only_on_rq: assert property (@(posedge Clk) disable iff (!rst_n)
    CAMAck |-> CAMRq)
    else $error("lup%0d: CAMAck without CAMRq", RANK);
  a_sram_own_slot: assert property (@(posedge Clk) disable iff (!rst_n)
    SRAMAck |-> slot == RANK)
    else $error("lup%0d: SRAM data outside the own slot", RANK);

endmodule
