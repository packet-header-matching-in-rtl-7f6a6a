// tb_sram_slot_mux: for every slot and phase, with random processor addresses
// and SRAM words, checks that the SRAM sees the slot owner's address, that
// only the owner is acknowledged, and that it gets the upper half of the word
// in phase 0 and the lower half in phase 1 (others get 0).
module tb_sram_slot_mux;
  import hm_pkg::*;
  logic [1:0] slot;
  logic phase;
  logic [N_LUP-1:0][SRAM_AW-1:0] lup_adr;
  logic [N_LUP-1:0][SRAM_HW-1:0] lup_data;
  logic [N_LUP-1:0] lup_ack;
  logic [SRAM_AW-1:0] sram_a;
  logic [INSN_W-1:0] sram_q;
  int checks = 0, failures = 0;

  sram_slot_mux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      slot  = 2'(n % 4);
      phase = 1'(n / 4 % 2);
      for (int k = 0; k < N_LUP; k++) lup_adr[k] = SRAM_AW'($urandom());
      sram_q = {4'($urandom()), 32'($urandom())};
      #1;
      check(sram_a == lup_adr[slot], "address of the slot owner");
      for (int k = 0; k < N_LUP; k++) begin
        check(lup_ack[k] == (k == int'(slot)), $sformatf("ack %0d", k));
        if (k == int'(slot))
          check(lup_data[k] == (phase ? sram_q[17:0] : sram_q[35:18]), $sformatf("data %0d", k));
        else
          check(lup_data[k] == '0, $sformatf("no data to %0d", k));
      end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
