// tb_slot_timer: checks that the slot counter runs 0,1,2,3,0,... with two
// clock cycles per slot, that slot_end marks the second cycle, and that reset
// returns it to slot 0, phase 0.
module tb_slot_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] slot;
  logic phase, slot_end;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  slot_timer dut (.*);

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (n = 0; n < 100; n++) begin
      #1;
      checks++;
      if (slot != 2'((n / 2) % 4) || phase != 1'(n % 2) || slot_end != 1'(n % 2)) begin
        failures++;
        $display("FAIL: cycle %0d slot=%0d phase=%0d", n, slot, phase);
      end
      @(posedge clk);
    end
    #1 rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (slot != 0 || phase != 0) begin failures++; $display("FAIL: reset"); end
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
