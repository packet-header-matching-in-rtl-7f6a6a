// hm_pkg: constants, instruction encoding and state type shared by the
// header matching engine.
//
// Time base. The shared memories are scheduled in 10 ns time slots, four slots
// per round, one slot per look-up processor. The engine clock runs at twice the
// slot rate (5 ns), so one slot is two clock cycles (phase 0 and phase 1). This
// is what lets a 272-bit CAM key go out as eight 34-bit beats in the four-slot
// "load data" window, and a 36-bit instruction come in as two 18-bit halves in
// one SRAM slot; the clock ratio itself is this design's choice.
//
// Instruction word (36 bits, 4-bit operation code + 32 bits of argument). The
// three instruction kinds and their parameters (CAM Step,List; compare
// Address,Step,Mask,Constant; EXE Queue) follow the document; the field
// positions, the opcode values and the step table are this design's choice:
//
//   [35:32] opcode
//   EXE  : [31:0]  Queue (pointer to the editing program)
//   CAM  : [26:24] Step code, [18:16] CAM mask-register index, [15:0] List
//   CMP  : [31:27] Address (16-bit register 0..31), [26:24] Step code,
//          [17:16] Mask (byte lanes: bit 1 = upper byte, bit 0 = lower byte),
//          [15:0]  Constant
//
// Relative jumps use a discrete set of steps: step = 2 ** (code + 1), that is
// 2, 4, ..., 256 words forward.
package hm_pkg;

  localparam int unsigned N_LUP       = 4;    // look-up processors, one per interface
  localparam int unsigned N_SETS      = 4;    // Unified-header sets per buffer
  localparam int unsigned SLOT_CYCLES = 2;    // clock cycles per 10 ns slot

  localparam int unsigned INSN_W      = 36;   // instruction word
  localparam int unsigned SRAM_AW     = 19;   // SRAM address (Figure 1: SRAMAdr(18:0))
  localparam int unsigned SRAM_HW     = 18;   // SRAM data half (Figure 1: SRAMData(17:0))

  localparam int unsigned BUF_AW      = 9;    // buffer address (Figure 1: Adr(8:0))
  localparam int unsigned BUF_DW      = 32;   // buffer data (Figure 1: Data(31:0))
  localparam int unsigned UH_WORDS    = 16;   // 32 x 16-bit registers = 16 x 32-bit words
  localparam int unsigned UH_ID_WORD  = 16;   // word holding the packet identification
  localparam int unsigned SET_AW      = 7;    // word address inside one set (128 words)

  localparam int unsigned CAM_DQ_W    = 34;   // CAM data bus (Figure 1: DQ(33:0))
  localparam int unsigned CAM_BEATS   = 8;    // 8 x 34 = 272-bit key
  localparam int unsigned CAM_IDX_W   = 12;   // 4K CAM words
  localparam int unsigned CAM_MASK_W  = 3;    // Figure 1: MaskIdx(2:0)

  localparam int unsigned REP_DW      = 32;   // Figure 1: REPData(31:0)
  localparam int unsigned REP_AW      = 16;   // Figure 1: REPDRAMAddr(15:0)

  // The CAM row r continues the program at SRAM word CAM_SRAM_BASE + r.
  localparam logic [SRAM_AW-1:0] CAM_SRAM_BASE = 19'h4_0000;

  typedef enum logic [3:0] {
    OP_EXE = 4'h0,
    OP_CAM = 4'h1,
    OP_EQ  = 4'h8,
    OP_NE  = 4'h9,
    OP_GT  = 4'hA,   // register >  constant
    OP_LT  = 4'hB,   // register <  constant
    OP_GE  = 4'hC,   // register >= constant
    OP_LE  = 4'hD    // register <= constant
  } opcode_e;

  // The six states of a look-up processor (the model of the sharing scheme).
  typedef enum logic [2:0] {
    S_SLEEP, S_WAIT, S_LOAD, S_LAT1, S_LAT2, S_COMP
  } lup_state_e;

  typedef struct packed {
    logic [REP_AW-1:0] id;     // packet identification (DRAM block number)
    logic [REP_DW-1:0] prog;   // pointer to the editing program
  } rep_entry_t;

  function automatic logic [SRAM_AW-1:0] step_of(input logic [2:0] code);
    return SRAM_AW'(1) << (code + 3'd1);
  endfunction

  function automatic logic is_cmp(input logic [3:0] op);
    return op[3] && (op[2:0] <= 3'd5);
  endfunction

  // Outcome of a comparison instruction on a 16-bit register.
  function automatic logic cmp_true(input logic [3:0] op, input logic [15:0] r,
                                    input logic [15:0] c);
    case (op)
      OP_EQ:   return r == c;
      OP_NE:   return r != c;
      OP_GT:   return r >  c;
      OP_LT:   return r <  c;
      OP_GE:   return r >= c;
      OP_LE:   return r <= c;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic [INSN_W-1:0] mk_exe(input logic [31:0] queue);
    return {OP_EXE, queue};
  endfunction

  function automatic logic [INSN_W-1:0] mk_cam(input logic [2:0] step,
                                               input logic [2:0] midx,
                                               input logic [15:0] list);
    return {OP_CAM, 5'd0, step, 5'd0, midx, list};
  endfunction

  function automatic logic [INSN_W-1:0] mk_cmp(input opcode_e op, input logic [4:0] adr,
                                               input logic [2:0] step, input logic [1:0] mask,
                                               input logic [15:0] k);
    return {op, adr, step, 6'd0, mask, k};
  endfunction

endpackage
