// slot_timer: the common time base of the look-up processors.
//
// The shared CAM and SRAM are scheduled in 10 ns time slots counted modulo 4;
// slot k is the SRAM slot of look-up processor k, and every processor changes
// its scheduling state only at the end of its own slot. That counter is the
// document's. The engine clock runs at SLOT_CYCLES (2) cycles per slot, so the
// timer also gives the phase inside the slot; the clock ratio is this design's.
//
// Interface: slot (0..3) and phase (0..SLOT_CYCLES-1) are registered; both
// are 0 in the first cycle after reset. slot_end is high in the last cycle of
// every slot.
module slot_timer
  import hm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] slot,
  output logic       phase,
  output logic       slot_end
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot  <= '0;
      phase <= 1'b0;
    end else begin
      phase <= ~phase;
      if (phase) slot <= slot + 2'd1;
    end
  end

  assign slot_end = phase;

endmodule
