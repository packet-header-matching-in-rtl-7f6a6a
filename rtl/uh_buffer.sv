// uh_buffer: Unified-header buffer between one header field extractor and one
// look-up processor.
//
// As in the document, the buffer holds four sets of registers, each one a
// complete Unified-header, in a dual-port memory so that the extractor's writes
// and the processor's reads are independent, and a status register with one
// bit per set. The extractor may write a set only while its bit is 0 and sets
// the bit when the header is complete (wr_done); the processor may use a set
// only while its bit is 1 and clears it when it is finished (Free). Writes to
// a full set are dropped and flagged by an assertion.
//
// Memory layout (this design's choice): 512 words of 32 bits, one 18 Kb block
// RAM. Address bits [8:7] select the set and [6:0] the word in it. Words 0..15
// hold the 32 16-bit Unified-header registers (register 2w in bits [15:0] of
// word w, register 2w+1 in bits [31:16]); word 16 holds the packet
// identification (DRAM block number) in bits [15:0].
//
// Read side (names as in the processor interface): Adr is registered, Data is
// valid one cycle after Adr. Ready is the status bit of the set selected by
// Adr[8:7]; a one-cycle Free clears that bit.
module uh_buffer
  import hm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // header field extractor side
  input  logic                 wr_en,
  input  logic [1:0]           wr_set,
  input  logic [SET_AW-1:0]    wr_addr,
  input  logic [BUF_DW-1:0]    wr_data,
  input  logic                 wr_done,     // the header in wr_set is complete
  output logic [N_SETS-1:0]    set_full,    // status register
  // look-up processor side
  input  logic [BUF_AW-1:0]    Adr,
  output logic [BUF_DW-1:0]    Data,
  output logic                 Ready,
  input  logic                 Free
);

  logic [BUF_DW-1:0] mem [2**BUF_AW];
  logic [N_SETS-1:0] status;
  logic [1:0]        rd_set;

  assign rd_set   = Adr[BUF_AW-1 -: 2];
  assign Ready    = status[rd_set];
  assign set_full = status;

  // write port: only into a free set
  always_ff @(posedge clk) begin
    if (wr_en && !status[wr_set])
      mem[{wr_set, wr_addr}] <= wr_data;
  end

  // read port
  always_ff @(posedge clk) begin
    Data <= mem[Adr];
  end

  // status register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      status <= '0;
    end else begin
      for (int s = 0; s < N_SETS; s++) begin
        if (wr_done && !status[wr_set] && wr_set == 2'(s)) status[s] <= 1'b1;
        else if (Free && rd_set == 2'(s))                  status[s] <= 1'b0;
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !status[wr_set])
    else $warning("uh_buffer: write into a set that holds an unprocessed header, dropped");
  a_free_only_full: assert property (@(posedge clk) disable iff (!rst_n)
    Free |-> status[rd_set])
    else $error("uh_buffer: Free of a set that holds no header");

endmodule
