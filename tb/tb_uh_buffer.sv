// tb_uh_buffer: checks the Unified-header buffer: data written into a free
// set reads back one cycle after the address, the status bit of a set goes
// to 1 with wr_done and to 0 with Free, Ready follows the set selected by the
// read address, and a write into a full set leaves its contents unchanged.
module tb_uh_buffer;
  import hm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, wr_done = 0, Free = 0, Ready;
  logic [1:0] wr_set = 0;
  logic [SET_AW-1:0] wr_addr = 0;
  logic [BUF_DW-1:0] wr_data = 0, Data;
  logic [N_SETS-1:0] set_full;
  logic [BUF_AW-1:0] Adr = 0;
  int checks = 0, failures = 0;
  logic [BUF_DW-1:0] ref_mem [N_SETS][UH_ID_WORD+1];

  always #2.5 clk = ~clk;

  uh_buffer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_set(input int s);
    for (int w = 0; w <= UH_ID_WORD; w++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 2'(s); wr_addr = SET_AW'(w); wr_data = $urandom();
      ref_mem[s][w] = wr_data;
    end
    @(negedge clk); wr_en = 0; wr_done = 1; wr_set = 2'(s);
    @(negedge clk); wr_done = 0;
  endtask

  task automatic read_check(input int s);
    for (int w = 0; w <= UH_ID_WORD; w++) begin
      @(negedge clk); Adr = {2'(s), SET_AW'(w)};
      @(negedge clk);
      check(Data == ref_mem[s][w], $sformatf("set %0d word %0d: %h vs %h", s, w, Data, ref_mem[s][w]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(set_full == 4'b0000, "empty after reset");
    for (int s = 0; s < N_SETS; s++) begin
      Adr = {2'(s), 7'd0}; #1;
      check(!Ready, "not ready before write");
      write_set(s);
      check(set_full[s], $sformatf("set %0d full after wr_done", s));
    end
    check(set_full == 4'b1111, "all full");
    // write into a full set is dropped
    @(negedge clk); wr_en = 1; wr_set = 2'd1; wr_addr = 7'd3; wr_data = ~ref_mem[1][3];
    @(negedge clk); wr_en = 0;
    for (int s = 0; s < N_SETS; s++) begin
      Adr = {2'(s), 7'd0}; #1;
      check(Ready, $sformatf("set %0d ready", s));
      read_check(s);
    end
    // free sets 2 and 0
    @(negedge clk); Adr = {2'd2, 7'd5}; Free = 1;
    @(negedge clk); Free = 0; #1;
    check(!Ready && set_full == 4'b1011, "set 2 freed");
    @(negedge clk); Adr = {2'd0, 7'd0}; Free = 1;
    @(negedge clk); Free = 0; #1;
    check(!Ready && set_full == 4'b1010, "set 0 freed");
    // refill set 2
    write_set(2);
    check(set_full == 4'b1110, "set 2 refilled");
    read_check(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
