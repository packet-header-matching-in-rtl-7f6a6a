// sram_slot_mux: time-slot multiplexer of the shared instruction SRAM.
//
// Each look-up processor has its own SRAM time slot (the document's scheme):
// during slot k the SRAM address comes from processor k, and only processor k
// gets data back, flagged by SRAMAck[k]. A 36-bit instruction word is passed
// on the processor's 18-bit data input in two halves, the upper half in the
// first cycle of the slot and the lower half in the second (the half-word
// order is this design's choice).
//
// Interface: sram_a is the address towards the SRAM, held for the whole slot;
// sram_q is the word read, expected within the slot (10 ns access time).
module sram_slot_mux
  import hm_pkg::*;
(
  input  logic [1:0]                      slot,
  input  logic                            phase,
  input  logic [N_LUP-1:0][SRAM_AW-1:0]   lup_adr,
  output logic [N_LUP-1:0][SRAM_HW-1:0]   lup_data,
  output logic [N_LUP-1:0]                lup_ack,
  output logic [SRAM_AW-1:0]              sram_a,
  input  logic [INSN_W-1:0]               sram_q
);

  logic [SRAM_HW-1:0] half;

  assign sram_a = lup_adr[slot];
  assign half   = phase ? sram_q[SRAM_HW-1:0] : sram_q[INSN_W-1:SRAM_HW];

  always_comb begin
    for (int k = 0; k < N_LUP; k++) begin
      lup_ack[k]  = (slot == 2'(k));
      lup_data[k] = lup_ack[k] ? half : '0;
    end
  end

endmodule
