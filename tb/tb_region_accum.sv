// tb_region_accum: random samples into 3 regions (plus ignored region ids)
// over several frames, including a sample on the frame_end cycle; totals and
// counts are compared with sums kept by the testbench.
module tb_region_accum;
  localparam int NR = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic add_valid, frame_end, done;
  logic [1:0] region;
  logic signed [16:0] value;
  logic signed [NR-1:0][39:0] sum;
  logic [NR-1:0][23:0] count;

  region_accum #(.NUM_REGIONS(NR), .REGION_W(2), .VAL_W(17), .ACC_W(40), .CNT_W(24)) dut (
    .clk, .rst_n, .add_valid, .region, .value, .frame_end, .done, .sum, .count);

  int checks = 0, failures = 0;
  longint e_sum [NR];
  int     e_cnt [NR];

  initial begin
    add_valid = 0; frame_end = 0; region = 0; value = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      int n;
      for (int r = 0; r < NR; r++) begin e_sum[r] = 0; e_cnt[r] = 0; end
      n = 50 + f * 20;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        add_valid = ($urandom_range(0, 3) != 0);
        region    = 2'($urandom_range(0, 3));
        value     = 17'(int'($urandom_range(0, 120000)) - 60000);
        frame_end = (i == n - 1);
        if (add_valid && region < NR) begin
          e_sum[region] += longint'(value);
          e_cnt[region] += 1;
        end
      end
      @(negedge clk);
      add_valid = 0; frame_end = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL done missing"); end
      for (int r = 0; r < NR; r++) begin
        checks += 2;
        if (sum[r] != 40'(e_sum[r])) begin failures++; $display("FAIL frame %0d region %0d sum %0d exp %0d", f, r, sum[r], e_sum[r]); end
        if (count[r] != 24'(e_cnt[r])) begin failures++; $display("FAIL frame %0d region %0d count", f, r); end
      end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
