// tb_lk_core: self-checking test of the Lucas-Kanade compute unit.
// A 24x24 frame pair with a 15x15 window: the top rows are flat (no texture,
// flow forced to zero), the left half of a smooth pattern moves one pixel
// down (towards the camera), the right half one pixel up. Every pixel's flow
// is compared with the reference model, the colour with an independent
// evaluation of the colour rule, the region speed sums and counts with sums
// over the reference flow, and the frame period with the extended-raster
// formula (WIDTH+8)*(HEIGHT+9) cycles.
module tb_lk_core;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int W = 24, H = 24, WIN = 15, NPIX = W*H;
  localparam longint DET_MIN = 65536;
  localparam int VMIN = 64;
  localparam int NFR = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, frame_done;
  lk_in_t in_pix;
  lk_out_t out_pix;
  logic signed [1:0][55:0] speed_sum;
  logic [1:0][23:0] moving_count;

  lk_core #(.WIDTH(W), .HEIGHT(H), .WIN(WIN), .NUM_REGIONS(2), .DET_MIN(DET_MIN)) dut (
    .clk, .rst_n, .v_min (vel_t'(VMIN)),
    .in_valid, .in_ready, .in_pix, .out_valid, .out_pix,
    .frame_done, .speed_sum, .moving_count);

  int checks = 0, failures = 0;
  int n_zero = 0, n_towards = 0, n_away = 0, n_offroad = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  pix_t   i0 [NPIX], i1 [NPIX];
  int     evx [NPIX], evy [NPIX];
  longint e_sum [2];
  int     e_cnt [2];
  lk_out_t got [$];
  int     frames_done = 0, cyc = 0, t_done [NFR];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit on_road(input int p);
    return (p / W) >= 2;
  endfunction
  function automatic int region_of(input int p);
    return ((p % W) < W/2) ? 0 : 1;
  endfunction
  function automatic int dist_of(input int p);
    return 100 + 10 * (p / W);
  endfunction

  // colour rule evaluated independently of the RTL
  function automatic logic [23:0] color_of(input int vx, input int vy);
    int t, a, r, l, cr, cg, cb;
    t = (vy > 0) ? vy / 4 : 0;  a = (vy < 0) ? (-vy) / 4 : 0;
    r = (vx > 0) ? vx / 4 : 0;  l = (vx < 0) ? (-vx) / 4 : 0;
    if (t > 255) t = 255; if (a > 255) a = 255; if (r > 255) r = 255; if (l > 255) l = 255;
    cr = 255 - t - a - l; cg = 255 - a - r; cb = 255 - t - r;
    if (cr < 0) cr = 0; if (cg < 0) cg = 0; if (cb < 0) cb = 0;
    return {8'(cr), 8'(cg), 8'(cb)};
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid) got.push_back(out_pix);
    if (frame_done && frames_done < NFR) begin
      t_done[frames_done] = cyc;
      check(got.size() == NPIX, $sformatf("%0d outputs", got.size()));
      for (int p = 0; p < NPIX && p < got.size(); p++) begin
        bit mv;
        mv = on_road(p) && (evy[p] >= VMIN || evy[p] <= -VMIN);
        check(int'(got[p].vx) == evx[p] && int'(got[p].vy) == evy[p],
              $sformatf("pixel (%0d,%0d) flow %0d,%0d expected %0d,%0d", p % W, p / W,
                        got[p].vx, got[p].vy, evx[p], evy[p]));
        check(got[p].rgb == color_of(evx[p], evy[p]), $sformatf("pixel %0d colour %h", p, got[p].rgb));
        check(got[p].moving == mv, $sformatf("pixel %0d moving flag", p));
        if (evx[p] == 0 && evy[p] == 0) n_zero++;
        if (mv && evy[p] > 0) n_towards++;
        if (mv && evy[p] < 0) n_away++;
        if (!on_road(p) && evy[p] != 0) n_offroad++;
      end
      for (int r = 0; r < 2; r++) begin
        check(speed_sum[r] == 56'(e_sum[r]), $sformatf("region %0d speed sum %0d expected %0d", r, speed_sum[r], e_sum[r]));
        check(moving_count[r] == 24'(e_cnt[r]), $sformatf("region %0d count %0d expected %0d", r, moving_count[r], e_cnt[r]));
      end
      got.delete();
      frames_done++;
    end
  end

  initial begin
    pix_t a0[], a1[];
    int vx[], vy[];
    for (int p = 0; p < NPIX; p++) begin
      int x, y;
      x = p % W; y = p / W;
      if (y < 10) begin
        i0[p] = 8'd100; i1[p] = 8'd100;
      end else begin
        i0[p] = pattern(x, y, 0, 0);
        i1[p] = pattern(x, y, 0, (x < W/2) ? 1 : -1);
      end
    end
    a0 = new[NPIX]; a1 = new[NPIX];
    foreach (a0[p]) begin a0[p] = i0[p]; a1[p] = i1[p]; end
    lk_ref(W, H, WIN, DET_MIN, a0, a1, vx, vy);
    e_sum[0] = 0; e_sum[1] = 0; e_cnt[0] = 0; e_cnt[1] = 0;
    for (int p = 0; p < NPIX; p++) begin
      evx[p] = vx[p]; evy[p] = vy[p];
      if (on_road(p) && (vy[p] >= VMIN || vy[p] <= -VMIN)) begin
        e_sum[region_of(p)] += longint'(vy[p]) * dist_of(p);
        e_cnt[region_of(p)] += 1;
      end
    end

    in_valid = 0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frames 0 and 1 back to back without gaps, frame 2 with random gaps
    for (int f = 0; f < NFR; f++) begin
      int sent;
      sent = 0;
      while (sent < NPIX) begin
        @(negedge clk);
        in_valid = (f < 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_pix = '{img0: i0[sent], img1: i1[sent], road: on_road(sent),
                   dist_mm: dist_t'(dist_of(sent)), region: region_t'(region_of(sent))};
        @(posedge clk);
        if (in_valid && in_ready) sent++;
        else if (in_valid) n_stall++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (frames_done == NFR);
    check(t_done[1] - t_done[0] == (W + WIN/2 + 1) * (H + WIN/2 + 2),
          $sformatf("frame period %0d cycles, expected %0d", t_done[1] - t_done[0], (W + 8) * (H + 9)));
    check(n_zero > 0, "no zero-flow pixel");
    check(n_towards > 0, "no motion towards the camera");
    check(n_away > 0, "no motion away from the camera");
    check(n_stall > 0, "input never held off");
    $display("zero=%0d towards=%0d away=%0d stalls=%0d sums=%0d,%0d counts=%0d,%0d",
             n_zero, n_towards, n_away, n_stall, e_sum[0], e_sum[1], e_cnt[0], e_cnt[1]);
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
