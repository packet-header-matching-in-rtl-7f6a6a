// cam_arbiter: mutual exclusion and fair sharing of the one CAM among the
// four look-up processors.
//
// Scheme (the document's): every processor k owns a "CAM slot", the round of
// four 10 ns slots that follows its own SRAM slot k. A processor may start
// loading data into the CAM at the beginning of its CAM slot if and only if no
// processor is loading data at that moment; while data is loaded (four slots)
// the CAM can do nothing else, but during the search latency another
// processor may already load. With this rule no processor waits longer than
// three rounds (120 ns) for the CAM.
//
// Implementation: CAMAck[k] = CAMRq[k] while slot == k and no load is in
// progress; the processor samples it at the end of slot k. A grant makes k
// the owner for the next four slots (until the end of slot k again), during
// which the owner's DQ, OPV and MaskIdx are switched to the CAM pins. The
// search results (MV, MF, CAMIdx) go to all processors unchanged; each takes
// them only during its own LAT2 round.
//
// Timing: CAMAck is combinational from CAMRq and the state; the CAM pins are a
// combinational multiplexer of the owner's outputs.
module cam_arbiter
  import hm_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [1:0]                      slot,
  input  logic                            phase,
  input  logic [N_LUP-1:0]                CAMRq,
  output logic [N_LUP-1:0]                CAMAck,
  input  logic [N_LUP-1:0]                lup_opv,
  input  logic [N_LUP-1:0][CAM_DQ_W-1:0]  lup_dq,
  input  logic [N_LUP-1:0][CAM_MASK_W-1:0] lup_mask_idx,
  output logic                            cam_opv,
  output logic [CAM_DQ_W-1:0]             cam_dq,
  output logic [CAM_MASK_W-1:0]           cam_mask_idx,
  output logic                            cam_busy,
  output logic [1:0]                      owner
);

  logic loading;

  assign cam_busy = loading;

  always_comb begin
    CAMAck = '0;
    for (int k = 0; k < N_LUP; k++)
      if (slot == 2'(k) && !loading) CAMAck[k] = CAMRq[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loading <= 1'b0;
      owner   <= '0;
    end else if (phase) begin              // end of a slot
      if (loading && slot == owner) loading <= 1'b0;
      if (CAMAck[slot]) begin
        loading <= 1'b1;
        owner   <= slot;
      end
    end
  end

  assign cam_opv      = loading && lup_opv[owner];
  assign cam_dq       = loading ? lup_dq[owner] : '0;
  assign cam_mask_idx = loading ? lup_mask_idx[owner] : '0;

  // only the owner drives the CAM
  a_one_loader: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(lup_opv) && (lup_opv == '0 || (loading && lup_opv[owner])))
    else $error("cam_arbiter: CAM data from a processor that does not own the CAM");

endmodule
