// tb_cam_arbiter: drives the CAM arbiter with four abstract look-up
// processors that follow the six-state sharing model (sleep, wait, load_data,
// latency1, latency2, comp) with random choices, and checks against a
// reference kept here: a grant only in the requester's own slot and only if
// no processor is loading, never two loaders, the CAM pins showing the
// loader's beats, and no wait longer than 12 slots (120 ns).
// It first replays the example schedule of the sharing scheme: processor 1
// (rank 0) loads in slots 1-4; processor 4 (rank 3), asking from slot 3 on,
// gets the CAM in the eighth slot; processor 2 (rank 1), asking in slot 9
// while processor 4 loads, gets it in slot 14. Slots are counted from the
// first slot after reset, which is slot 0.
module tb_cam_arbiter;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] slot;
  logic phase, slot_end;
  logic [N_LUP-1:0] CAMRq, CAMAck, lup_opv;
  logic [N_LUP-1:0][CAM_DQ_W-1:0] lup_dq;
  logic [N_LUP-1:0][CAM_MASK_W-1:0] lup_mask_idx;
  logic cam_opv, cam_busy;
  logic [CAM_DQ_W-1:0] cam_dq;
  logic [CAM_MASK_W-1:0] cam_mask_idx;
  logic [1:0] owner;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  slot_timer u_t (.clk, .rst_n, .slot, .phase, .slot_end);
  cam_arbiter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  lup_state_e st [N_LUP];
  int wait_slots [N_LUP];
  int max_wait = 0, n_grants = 0, n_waits = 0;
  bit wants [N_LUP];
  bit directed = 1'b1;
  int col = 0;                   // slots since reset
  int first_load [N_LUP];

  // requests and beats, set at the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < N_LUP; k++) begin
        if (slot == 2'(k) && phase == 1'b0) begin
          if (directed) begin
            case (k)
              0:       wants[k] = (st[k] == S_SLEEP && col == 0);
              3:       wants[k] = (st[k] == S_SLEEP && col >= 3) || st[k] == S_WAIT;
              1:       wants[k] = (st[k] == S_SLEEP && col >= 9) || st[k] == S_WAIT;
              default: wants[k] = 1'b0;
            endcase
          end else
          case (st[k])
            S_SLEEP: wants[k] = ($urandom_range(1) == 1);
            S_WAIT:  wants[k] = 1'b1;
            S_COMP:  wants[k] = ($urandom_range(2) == 0);
            default: wants[k] = 1'b0;
          endcase
        end
        CAMRq[k]        = (slot == 2'(k)) && wants[k];
        lup_opv[k]      = (st[k] == S_LOAD);
        lup_dq[k]       = lup_opv[k] ? {2'(k), 32'($urandom())} : '0;
        lup_mask_idx[k] = 3'(k + 1);
      end
    end
  end

  // reference check and model transitions at the end of each own slot
  always @(posedge clk) begin
    if (rst_n) begin
      int loaders, who;
      loaders = 0;
      who = 0;
      for (int k = 0; k < N_LUP; k++) if (st[k] == S_LOAD) begin loaders++; who = k; end
      check(loaders <= 1, $sformatf("two loaders: %0d %0d %0d %0d slot %0d ph %0d", st[0], st[1], st[2], st[3], slot, phase));
      check(cam_opv == (loaders == 1), "cam_opv");
      if (loaders == 1) check(cam_dq == lup_dq[who] && cam_mask_idx == lup_mask_idx[who],
                              "CAM pins show the loader");
      for (int k = 0; k < N_LUP; k++) begin
        bit exp_ack;
        exp_ack = CAMRq[k] && slot == 2'(k) && loaders == 0;
        check(CAMAck[k] == exp_ack, $sformatf("CAMAck[%0d]=%0d expected %0d (slot %0d)",
                                              k, CAMAck[k], exp_ack, slot));
      end
      if (phase) begin
        int k;
        k = slot;
        col <= col + 1;
        for (int j = 0; j < N_LUP; j++) if (st[j] == S_WAIT) wait_slots[j]++;
        case (st[k])
          S_SLEEP, S_COMP, S_WAIT: begin
            if (wants[k]) begin
              if (CAMAck[k]) begin
                st[k] <= S_LOAD;
                if (first_load[k] < 0) first_load[k] = col + 1;
                n_grants++;
                if (wait_slots[k] > max_wait) max_wait = wait_slots[k];
                wait_slots[k] = 0;
              end else begin
                if (st[k] != S_WAIT) n_waits++;
                st[k] <= S_WAIT;
              end
            end else if (st[k] == S_COMP && !directed) begin
              st[k] <= ($urandom_range(1) == 1) ? S_COMP : S_SLEEP;
            end
          end
          S_LOAD: st[k] <= S_LAT1;
          S_LAT1: st[k] <= S_LAT2;
          S_LAT2: st[k] <= S_COMP;
          default: st[k] <= S_SLEEP;
        endcase
      end
    end
  end

  initial begin
    for (int k = 0; k < N_LUP; k++) begin
      st[k] = S_SLEEP; wait_slots[k] = 0; wants[k] = 0;
    end
    CAMRq = '0; lup_opv = '0; lup_dq = '0; lup_mask_idx = '0;
    for (int k = 0; k < N_LUP; k++) first_load[k] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // example schedule
    repeat (2 * 24) @(posedge clk);
    check(first_load[0] == 1,  $sformatf("processor 1 loads from slot %0d, expected 1", first_load[0]));
    check(first_load[3] == 8,  $sformatf("processor 4 loads from slot %0d, expected 8", first_load[3]));
    check(first_load[1] == 14, $sformatf("processor 2 loads from slot %0d, expected 14", first_load[1]));
    check(first_load[2] == -1, "processor 3 never loads");
    // random traffic from a fresh reset
    #1 rst_n = 1'b0;
    @(posedge clk);
    for (int k = 0; k < N_LUP; k++) begin
      st[k] = S_SLEEP; wait_slots[k] = 0; wants[k] = 0;
    end
    directed = 1'b0;
    max_wait = 0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20000) @(posedge clk);
    check(n_grants > 100 && n_waits > 10, $sformatf("grants %0d waits %0d", n_grants, n_waits));
    check(max_wait <= 12, $sformatf("longest wait %0d slots, bound 12", max_wait));
    $display("grants=%0d waits=%0d max_wait_slots=%0d", n_grants, n_waits, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
