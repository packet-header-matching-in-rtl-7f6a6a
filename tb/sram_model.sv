// sram_model: behavioural model of the external instruction SRAM (2**19 words
// of 36 bits, asynchronous read within the 10 ns slot), for simulation only.
// The testbench fills it with write_word; unwritten words read as 0.
module sram_model
  import hm_pkg::*;
(
  input  logic [SRAM_AW-1:0] a,
  output logic [INSN_W-1:0]  q
);

  logic [INSN_W-1:0] mem [2**SRAM_AW];

  initial begin
    for (int i = 0; i < 2**SRAM_AW; i++) mem[i] = '0;
  end

  task automatic write_word(input int unsigned adr, input logic [INSN_W-1:0] w);
    mem[adr] = w;
  endtask

  assign q = mem[a];

endmodule
