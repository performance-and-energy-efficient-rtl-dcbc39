// tb_lk_window_sum: drives a 20x12 image of random derivatives through a
// 5x5 window unit in the raster order used by the flow unit (one extra
// column/row before, HALF+1 columns after each row, HALF+1 rows after the
// image, with random idle cycles) and compares every window sum with a
// brute-force sum over the window, derivatives outside the image being zero.
module tb_lk_window_sum;
  import sc_pkg::*;
  localparam int W = 20, H = 12, WIN = 5, HALF = WIN / 2;
  localparam int CW = $clog2(W + 2*WIN) + 1, RW = $clog2(H + 2*WIN) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, out_valid;
  logic signed [CW-1:0] x, out_x;
  logic signed [RW-1:0] y, out_y;
  lk_grad_t g;
  lk_sums_t sums;

  lk_window_sum #(.WIDTH(W), .HEIGHT(H), .WIN(WIN)) dut (
    .clk, .rst_n, .en, .x, .y, .g, .out_valid, .out_x, .out_y, .sums);

  int checks = 0, failures = 0, n_out = 0;
  lk_grad_t img [H][W];

  function automatic lk_sums_t ref_sums(input int cx, input int cy);
    lk_sums_t s;
    s = '0;
    for (int v = cy - HALF; v <= cy + HALF; v++)
      for (int u = cx - HALF; u <= cx + HALF; u++)
        if (u >= 0 && u < W && v >= 0 && v < H) begin
          s.sxx += img[v][u].gx * img[v][u].gx;
          s.sxy += img[v][u].gx * img[v][u].gy;
          s.syy += img[v][u].gy * img[v][u].gy;
          s.sxt += img[v][u].gx * img[v][u].gt;
          s.syt += img[v][u].gy * img[v][u].gt;
        end
    return s;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int ex, ey;
    ex = n_out % W; ey = (n_out / W) % H;
    checks++;
    if (int'(out_x) != ex || int'(out_y) != ey || sums != ref_sums(ex, ey)) begin
      failures++;
      if (failures < 10) $display("FAIL output %0d at (%0d,%0d), expected (%0d,%0d)", n_out, out_x, out_y, ex, ey);
    end
    n_out++;
  end

  initial begin
    for (int v = 0; v < H; v++) for (int u = 0; u < W; u++) begin
      img[v][u].gx = grad_t'($urandom_range(0, 510) - 255);
      img[v][u].gy = grad_t'($urandom_range(0, 510) - 255);
      img[v][u].gt = grad_t'($urandom_range(0, 510) - 255);
    end
    en = 0; x = 0; y = 0; g = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++)
      for (int v = -1; v <= H + HALF; v++)
        for (int u = -1; u <= W + HALF - 1; u++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            en = 0;
            @(negedge clk);
          end
          en = 1; x = CW'(u); y = RW'(v);
          g = (u >= 0 && u < W && v >= 0 && v < H) ? img[v][u] : '0;
        end
    @(negedge clk);
    en = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != 2 * W * H) begin failures++; $display("FAIL %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
