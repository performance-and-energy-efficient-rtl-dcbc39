// tb_lk_solver: window sums built from random derivative sets (plus flat
// windows below the determinant threshold and huge flows that saturate) are
// fed one per clock; each result is compared with exact 64-bit integer
// arithmetic of v = -2 * adj(G) * b / det, and the latency is checked to be
// 2 + VEL_W clocks.
module tb_lk_solver;
  import sc_pkg::*;
  localparam longint DET_MIN = 65536;
  localparam int N = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  lk_sums_t sums;
  logic [15:0] in_sb, out_sb;
  vel_t vx, vy;

  lk_solver #(.SBW(16), .DET_MIN(DET_MIN)) dut (
    .clk, .rst_n, .in_valid, .sums, .in_sb, .out_valid, .vx, .vy, .out_sb);

  int checks = 0, failures = 0, n_zero = 0, n_sat = 0, n_out = 0;
  int ex [N], ey [N], t_in [N];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void ref_v(input lk_sums_t s, output int vxr, output int vyr);
    longint det, nx, ny, qx, qy;
    det = longint'(s.sxx) * s.syy - longint'(s.sxy) * s.sxy;
    nx  = -2 * (longint'(s.syy) * s.sxt - longint'(s.sxy) * s.syt);
    ny  = -2 * (longint'(s.sxx) * s.syt - longint'(s.sxy) * s.sxt);
    if (det <= DET_MIN) begin vxr = 0; vyr = 0; return; end
    qx = ((nx < 0 ? -nx : nx) * 256) / det;
    qy = ((ny < 0 ? -ny : ny) * 256) / det;
    if (qx > 32767) qx = 32767;
    if (qy > 32767) qy = 32767;
    vxr = int'(nx < 0 ? -qx : qx);
    vyr = int'(ny < 0 ? -qy : qy);
  endfunction

  function automatic lk_sums_t make_sums(input int kind);
    lk_sums_t s;
    int gx, gy, gt, a, b;
    s = '0;
    a = $urandom_range(-3, 3); b = $urandom_range(-3, 3);
    for (int k = 0; k < 225; k++) begin
      gx = $urandom_range(0, 510) - 255;
      gy = $urandom_range(0, 510) - 255;
      if (kind == 1) begin gx = gx / 128; gy = gy / 128; end        // almost flat
      if (kind == 2) begin                                         // weak texture
        gx = $urandom_range(0, 1) ? 2 : -2;
        gy = $urandom_range(0, 1) ? 2 : -2;
      end
      // It roughly consistent with a flow (a, b) plus noise;
      // kind 2: strong temporal change, flow far beyond the output range
      gt = -(a * gx + b * gy) / 2 + $urandom_range(0, 20) - 10;
      if (kind == 2) gt = (gx > 0) ? 255 : -255;
      if (gt > 255) gt = 255; if (gt < -255) gt = -255;
      s.sxx += gx * gx; s.sxy += gx * gy; s.syy += gy * gy;
      s.sxt += gx * gt; s.syt += gy * gt;
    end
    return s;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int i;
    i = int'(out_sb);
    n_out++;
    checks++;
    if (int'(vx) != ex[i] || int'(vy) != ey[i]) begin
      failures++;
      if (failures < 10) $display("FAIL %0d: %0d,%0d expected %0d,%0d", i, vx, vy, ex[i], ey[i]);
    end
    checks++;
    if (cyc - t_in[i] != 2 + VEL_W) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", cyc - t_in[i]);
    end
    if (ex[i] == 0 && ey[i] == 0) n_zero++;
    if (ex[i] == 32767 || ex[i] == -32767 || ey[i] == 32767 || ey[i] == -32767) n_sat++;
  end

  initial begin
    in_valid = 0; sums = '0; in_sb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      lk_sums_t s;
      @(negedge clk);
      s = make_sums(i % 10 == 3 ? 1 : (i % 10 == 7 ? 2 : 0));
      ref_v(s, ex[i], ey[i]);
      sums = s; in_sb = 16'(i); in_valid = 1;
      t_in[i] = cyc;
      if (i % 5 == 4) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL %0d results", n_out); end
    checks++;
    if (n_zero == 0 || n_sat == 0) begin failures++; $display("FAIL zero=%0d sat=%0d", n_zero, n_sat); end
    $display("zero=%0d saturated=%0d", n_zero, n_sat);
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
