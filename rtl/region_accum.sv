// region_accum: per-region frame accumulators.
//
// The kernels report one number per road region and frame: the road area
// covered by moving pixels (background subtraction) or the sum of pixel
// speeds (optical flow). Each region (a carriageway side or a lane) has a
// signed sum and a sample counter. A sample is added when add_valid is high;
// a sample whose region id is NUM_REGIONS or above is ignored. On frame_end
// (which may coincide with the last sample, which is then included) the
// totals are copied to sum/count, done pulses for one cycle and the
// accumulators restart from zero.
// The source design keeps one global moving-area accumulator in local memory;
// splitting it by region follows its per-side results, the register layout is
// this implementation's choice.
module region_accum #(
  parameter int unsigned NUM_REGIONS = 2,
  parameter int unsigned REGION_W    = 2,
  parameter int unsigned VAL_W       = 17,
  parameter int unsigned ACC_W       = 40,
  parameter int unsigned CNT_W       = 24
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   add_valid,
  input  logic [REGION_W-1:0]                    region,
  input  logic signed [VAL_W-1:0]                value,
  input  logic                                   frame_end,
  output logic                                   done,
  output logic signed [NUM_REGIONS-1:0][ACC_W-1:0] sum,
  output logic [NUM_REGIONS-1:0][CNT_W-1:0]      count
);

  logic signed [NUM_REGIONS-1:0][ACC_W-1:0] acc, acc_next;
  logic [NUM_REGIONS-1:0][CNT_W-1:0]        cnt, cnt_next;

  always_comb begin
    acc_next = acc;
    cnt_next = cnt;
    for (int r = 0; r < NUM_REGIONS; r++) begin
      if (add_valid && (32'(region) == r)) begin
        acc_next[r] = acc[r] + ACC_W'(value);
        cnt_next[r] = cnt[r] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cnt   <= '0;
      sum   <= '0;
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= frame_end;
      if (frame_end) begin
        sum   <= acc_next;
        count <= cnt_next;
        acc   <= '0;
        cnt   <= '0;
      end else begin
        acc <= acc_next;
        cnt <= cnt_next;
      end
    end
  end

endmodule
