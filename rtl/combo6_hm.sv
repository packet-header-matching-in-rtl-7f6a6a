// combo6_hm: header matching engine of a four-interface IPv6/IPv4 router card.
//
// Each network interface has a header field extractor (outside this module)
// that writes the fixed-format Unified-header of every packet into that
// interface's uh_buffer. Each interface also has its own look-up processor
// (lup) that runs the look-up program on the header and ends with the pointer
// to an editing program, which it puts together with the packet's
// identification into the output queue for the packet replicator.
//
// The four processors share one external CAM (ternary, 4K x 272 bits, about
// 80 ns per search) and one external instruction SRAM (36-bit words, 10 ns).
// Sharing is by time slots of 10 ns counted modulo 4 (slot_timer): the SRAM
// is used by processor k only in slot k (sram_slot_mux), and the CAM is given
// to processor k at the start of its CAM slot only when nobody is loading it
// (cam_arbiter). Loading a key takes four slots, and the search of one
// processor overlaps the loading of the next. All of this structure follows
// the document; clocking at two cycles per slot, the buffer layout, the
// instruction encoding and the output queue's policy are this design's (see
// hm_pkg and the modules).
//
// External interfaces:
//   ext_*   - per-interface write ports of the Unified-header buffers
//   cam_*   - the CAM: key beats out (cam_opv, cam_dq, cam_mask_idx), result
//             in (cam_mv strobe, cam_mf match, cam_mm multiple match, cam_idx)
//   sram_*  - the SRAM: address out, 36-bit word in within the slot
//   rep_*   - read side of the output queue (valid/ready)
//   cfg_*   - host configuration: root CAM instruction and the CAM half in
//             production use (switched atomically; each header uses the half
//             selected when its walk started)
module combo6_hm
  import hm_pkg::*;
#(
  parameter int unsigned OQ_DEPTH = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // configuration
  input  logic [INSN_W-1:0]                  cfg_root,
  input  logic                               cfg_bank,
  // header field extractors
  input  logic [N_LUP-1:0]                   ext_wr_en,
  input  logic [N_LUP-1:0][1:0]              ext_wr_set,
  input  logic [N_LUP-1:0][SET_AW-1:0]       ext_wr_addr,
  input  logic [N_LUP-1:0][BUF_DW-1:0]       ext_wr_data,
  input  logic [N_LUP-1:0]                   ext_wr_done,
  output logic [N_LUP-1:0][N_SETS-1:0]       ext_set_full,
  // CAM
  output logic                               cam_opv,
  output logic [CAM_DQ_W-1:0]                cam_dq,
  output logic [CAM_MASK_W-1:0]              cam_mask_idx,
  input  logic                               cam_mv,
  input  logic                               cam_mf,
  input  logic                               cam_mm,
  input  logic [CAM_IDX_W-1:0]               cam_idx,
  // SRAM
  output logic [SRAM_AW-1:0]                 sram_a,
  input  logic [INSN_W-1:0]                  sram_q,
  // output queue to the packet replicator
  output logic                               rep_valid,
  input  logic                               rep_ready,
  output rep_entry_t                         rep_entry,
  output logic [1:0]                         rep_src,
  output logic                               oq_overflow,
  output logic [15:0]                        oq_dropped,
  // status
  output logic [1:0]                         slot,
  output logic                               phase,
  output lup_state_e [N_LUP-1:0]             lup_state,
  output logic                               cam_busy
);

  logic [N_LUP-1:0][BUF_AW-1:0]        buf_adr;
  logic [N_LUP-1:0][BUF_DW-1:0]        buf_data;
  logic [N_LUP-1:0]                    buf_ready, buf_free;
  logic [N_LUP-1:0]                    cam_rq, cam_ack, lup_opv;
  logic [N_LUP-1:0][CAM_DQ_W-1:0]      lup_dq;
  logic [N_LUP-1:0][CAM_MASK_W-1:0]    lup_mask_idx;
  logic [N_LUP-1:0][SRAM_AW-1:0]       lup_sram_adr;
  logic [N_LUP-1:0][SRAM_HW-1:0]       lup_sram_data;
  logic [N_LUP-1:0]                    lup_sram_ack;
  logic [N_LUP-1:0]                    rep_wr;
  rep_entry_t [N_LUP-1:0]              rep_wr_entry;

  slot_timer u_timer (
    .clk, .rst_n, .slot, .phase, .slot_end ()
  );

  for (genvar k = 0; k < N_LUP; k++) begin : g_if
    uh_buffer u_buf (
      .clk, .rst_n,
      .wr_en    (ext_wr_en[k]),
      .wr_set   (ext_wr_set[k]),
      .wr_addr  (ext_wr_addr[k]),
      .wr_data  (ext_wr_data[k]),
      .wr_done  (ext_wr_done[k]),
      .set_full (ext_set_full[k]),
      .Adr      (buf_adr[k]),
      .Data     (buf_data[k]),
      .Ready    (buf_ready[k]),
      .Free     (buf_free[k])
    );

    lup #(.RANK(2'(k))) u_lup (
      .Clk         (clk),
      .rst_n,
      .slot,
      .phase,
      .cfg_root,
      .cfg_bank,
      .Adr         (buf_adr[k]),
      .Data        (buf_data[k]),
      .Ready       (buf_ready[k]),
      .Free        (buf_free[k]),
      .CAMRq       (cam_rq[k]),
      .CAMAck      (cam_ack[k]),
      .OPV         (lup_opv[k]),
      .DQ          (lup_dq[k]),
      .MaskIdx     (lup_mask_idx[k]),
      .MF          (cam_mf),
      .MM          (cam_mm),
      .MV          (cam_mv),
      .CAMIdx      (cam_idx),
      .SRAMAdr     (lup_sram_adr[k]),
      .SRAMData    (lup_sram_data[k]),
      .SRAMAck     (lup_sram_ack[k]),
      .REPData     (rep_wr_entry[k].prog),
      .REPDRAMAddr (rep_wr_entry[k].id),
      .REPWrite    (rep_wr[k]),
      .state       (lup_state[k])
    );
  end

  cam_arbiter u_cam_arb (
    .clk, .rst_n, .slot, .phase,
    .CAMRq        (cam_rq),
    .CAMAck       (cam_ack),
    .lup_opv      (lup_opv),
    .lup_dq       (lup_dq),
    .lup_mask_idx (lup_mask_idx),
    .cam_opv,
    .cam_dq,
    .cam_mask_idx,
    .cam_busy,
    .owner        ()
  );

  sram_slot_mux u_sram_mux (
    .slot, .phase,
    .lup_adr  (lup_sram_adr),
    .lup_data (lup_sram_data),
    .lup_ack  (lup_sram_ack),
    .sram_a,
    .sram_q
  );

  output_queue #(.DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst_n,
    .wr        (rep_wr),
    .wr_entry  (rep_wr_entry),
    .rd_valid  (rep_valid),
    .rd_ready  (rep_ready),
    .rd_entry  (rep_entry),
    .rd_src    (rep_src),
    .overflow  (oq_overflow),
    .dropped   (oq_dropped)
  );

  // The properties of the sharing scheme: never two processors loading the
  // CAM, and a processor that starts waiting for the CAM gets it within three
  // rounds (12 slots, 120 ns, 24 cycles).
  logic [N_LUP-1:0] loading;
  always_comb
    for (int k = 0; k < N_LUP; k++) loading[k] = (lup_state[k] == S_LOAD);

  a_cam_mutex: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(loading))
    else $error("combo6_hm: two processors load the CAM");

  for (genvar k = 0; k < N_LUP; k++) begin : g_fair
    a_no_starving: assert property (@(posedge clk) disable iff (!rst_n)
      (lup_state[k] == S_WAIT && $past(lup_state[k]) != S_WAIT) |-> ##[1:24] loading[k])
      else $error("combo6_hm: processor %0d waited more than 120 ns for the CAM", k);
  end

endmodule
