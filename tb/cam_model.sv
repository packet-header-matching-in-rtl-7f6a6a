// cam_model: behavioural model of the external ternary CAM (4K words of 272
// bits), for simulation only; the real part is a vendor chip.
//
// A key arrives as CAM_BEATS consecutive beats of 34 bits while opv is high;
// beat b fills key bits [34*b +: 34]. Each row has a value, a care mask and a
// valid bit; eight global mask registers, chosen by mask_idx at the first
// beat, mask the key further. The lowest-numbered matching valid row wins.
// mv pulses LAT cycles after the last beat with mf (match), mm (more than one
// row matched) and idx (the winning row). The default LAT puts the result 80
// ns (16 cycles of 5 ns) after the first beat. Rows and mask registers are
// written by the testbench with write_row / write_mask.
module cam_model
  import hm_pkg::*;
#(
  parameter int unsigned ROWS = 4096,
  parameter int unsigned LAT  = 9
) (
  input  logic                   clk,
  input  logic                   opv,
  input  logic [CAM_DQ_W-1:0]    dq,
  input  logic [CAM_MASK_W-1:0]  mask_idx,
  output logic                   mv,
  output logic                   mf,
  output logic                   mm,
  output logic [CAM_IDX_W-1:0]   idx
);

  localparam int unsigned KW = CAM_DQ_W * CAM_BEATS;

  logic [KW-1:0] value [ROWS];
  logic [KW-1:0] care  [ROWS];
  logic          valid [ROWS];
  logic [KW-1:0] gmask [8];

  logic [KW-1:0]          key;
  int unsigned            beat;
  logic [CAM_MASK_W-1:0]  midx;
  longint unsigned        now;
  int unsigned            searches;

  typedef struct { longint unsigned due; logic f; logic m; logic [CAM_IDX_W-1:0] i; } res_t;
  res_t pend[$];

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      valid[r] = 1'b0; value[r] = '0; care[r] = '0;
    end
    for (int m = 0; m < 8; m++) gmask[m] = '1;
    beat = 0; now = 0; searches = 0; key = '0; midx = '0;
    mv = 1'b0; mf = 1'b0; mm = 1'b0; idx = '0;
  end

  task automatic write_row(input int r, input logic [KW-1:0] v, input logic [KW-1:0] c);
    value[r] = v; care[r] = c; valid[r] = 1'b1;
  endtask

  task automatic write_mask(input int m, input logic [KW-1:0] g);
    gmask[m] = g;
  endtask

  always @(posedge clk) begin
    logic [KW-1:0] k;
    res_t          r;
    int            n;
    now <= now + 1;
    mv  <= 1'b0;
    if (pend.size() != 0 && pend[0].due == now) begin
      r   = pend.pop_front();
      mv  <= 1'b1;
      mf  <= r.f;
      mm  <= r.m;
      idx <= r.i;
    end
    if (opv) begin
      if (beat == 0) midx = mask_idx;
      k = key;
      k[CAM_DQ_W*beat +: CAM_DQ_W] = dq;
      key = k;
      if (beat == CAM_BEATS - 1) begin
        beat = 0;
        searches++;
        n = 0;
        r.f = 1'b0; r.m = 1'b0; r.i = '0;
        for (int row = 0; row < ROWS; row++) begin
          if (valid[row] && (((k ^ value[row]) & care[row] & gmask[midx]) == '0)) begin
            if (n == 0) r.i = CAM_IDX_W'(row);
            n++;
          end
        end
        r.f   = (n != 0);
        r.m   = (n > 1);
        r.due = now + LAT;
        pend.push_back(r);
      end else begin
        beat++;
      end
    end
  end

endmodule
