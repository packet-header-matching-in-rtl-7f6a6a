// tb_output_queue: random one-hot writes from the four processors and a
// randomly stalling reader, checked against a reference queue: order, data,
// source tag, and (with the reader stopped) the overflow flag and the count
// of dropped entries.
module tb_output_queue;
  import hm_pkg::*;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_LUP-1:0] wr;
  rep_entry_t [N_LUP-1:0] wr_entry;
  logic rd_valid, rd_ready, overflow;
  rep_entry_t rd_entry;
  logic [1:0] rd_src;
  logic [15:0] dropped;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  output_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { rep_entry_t e; logic [1:0] src; } ref_t;
  ref_t q[$];
  int exp_drop = 0, nread = 0;
  bit stop_reader = 0;

  // reader and reference, at the rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_valid && rd_ready) begin
        ref_t r;
        nread++;
        if (q.size() == 0) check(0, "read from empty reference");
        else begin
          r = q.pop_front();
          check(rd_entry == r.e && rd_src == r.src, "entry order and contents");
        end
      end
      if (wr != '0) begin
        int k;
        ref_t r;
        for (k = 0; k < N_LUP; k++) if (wr[k]) break;
        if (q.size() < DEPTH) begin
          r.e = wr_entry[k]; r.src = 2'(k);
          q.push_back(r);
        end else begin
          exp_drop++;
        end
      end
    end
  end

  // drivers, at the falling edge
  always @(negedge clk) begin
    wr = '0;
    if (rst_n && $urandom_range(2) == 0) wr[$urandom_range(N_LUP - 1)] = 1'b1;
    for (int k = 0; k < N_LUP; k++) wr_entry[k] = {16'($urandom()), 32'($urandom())};
    rd_ready = !stop_reader && ($urandom_range(1) == 1);
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    check(!overflow && dropped == 0, "no overflow with a reader at half rate");
    stop_reader = 1;
    repeat (100) @(posedge clk);
    #1;
    check(overflow, "overflow flag");
    check(int'(dropped) == exp_drop && exp_drop > 0, $sformatf("dropped %0d expected %0d", dropped, exp_drop));
    stop_reader = 0;
    repeat (200) @(posedge clk);
    check(nread > 900, "throughput");
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
