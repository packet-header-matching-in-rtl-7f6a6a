// output_queue: the queue between the look-up processors and the packet
// replicator.
//
// On an EXE instruction a processor puts the packet identification and the
// Queue argument (pointer to the editing program) into the output queue; the
// replicator takes them from there. The queue is a FIFO of DEPTH entries, each
// tagged with the interface (processor) it came from. The processors write
// in their own slots, so at most one write arrives per cycle (checked by an
// assertion; if it happened, the lowest-numbered writer would win). The
// processor interface has no back-pressure, so a write into a full queue is
// dropped and counted, and the sticky overflow flag is raised; depth, tag and
// the overflow policy are this design's choices.
//
// Read side: valid/ready handshake, an entry leaves when both are high.
module output_queue
  import hm_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_LUP-1:0]             wr,
  input  rep_entry_t [N_LUP-1:0]       wr_entry,
  output logic                         rd_valid,
  input  logic                         rd_ready,
  output rep_entry_t                   rd_entry,
  output logic [1:0]                   rd_src,
  output logic                         overflow,
  output logic [15:0]                  dropped
);

  localparam int unsigned AW = $clog2(DEPTH);

  rep_entry_t       q_entry [DEPTH];
  logic [1:0]       q_src   [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             push, pop, any_wr;
  logic [1:0]       wsel;
  rep_entry_t       wdata;

  always_comb begin
    any_wr = 1'b0;
    wsel   = '0;
    for (int k = N_LUP - 1; k >= 0; k--) begin
      if (wr[k]) begin
        any_wr = 1'b1;
        wsel   = 2'(k);
      end
    end
  end

  assign wdata    = wr_entry[wsel];
  assign rd_valid = (count != '0);
  assign pop      = rd_valid && rd_ready;
  assign push     = any_wr && (count != (AW+1)'(DEPTH) || pop);
  assign rd_entry = q_entry[rptr];
  assign rd_src   = q_src[rptr];

  always_ff @(posedge clk) begin
    if (push) begin
      q_entry[wptr] <= wdata;
      q_src[wptr]   <= wsel;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (any_wr && !push) begin
        overflow <= 1'b1;
        dropped  <= dropped + 16'd1;
      end
    end
  end

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr))
    else $error("output_queue: two processors wrote in the same cycle");

endmodule
