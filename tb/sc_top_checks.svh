// sc_top_checks.svh: stimulus and checking shared by the end-to-end
// testbenches of smart_city_top. The including module declares W, H, NPIX,
// NB, NL, NR, NFR, the thresholds, WATCHDOG, clk/rst_n and the top's port
// signals. Every unit gets NFR frames; the first without input gaps, the
// others with a unit-specific rate of idle cycles.

  int checks = 0, failures = 0;
  int n_moving = 0, n_bgupd = 0, n_sat = 0, n_bstall = 0, n_bdone = 0;
  int n_zero = 0, n_towards = 0, n_away = 0, n_lstall = 0, n_ldone = 0;
  int n_ready = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit lk_on_road(input int p);
    return (p / W) >= 2;
  endfunction
  function automatic int lk_region(input int p);
    // carriageway split at column 704 of 1280, scaled to the frame width
    return ((p % W) < (W * 704) / 1280) ? 0 : 1;
  endfunction
  function automatic int lk_dist(input int p);
    return 100 + 10 * ((p / W) % 64);
  endfunction

  // ---------------------------------------------------------------- BGS ----
  for (genvar i = 0; i < NB; i++) begin : g_b
    bgs_in_t  fr [NFR][NPIX];
    bgs_out_t eo [NFR][NPIX];
    longint   ea [NFR][4];
    int       ec [NFR][4];
    int       fd, nout;
    logic     v;
    bgs_in_t  pix;
    assign bgs_in_valid[i] = v;
    assign bgs_in_pix[i]   = pix;

    initial begin : drive
      bgs_in_t  a[];
      bgs_out_t o[];
      longint   ta[4];
      int       tc[4];
      int       sent;
      v = 0; pix = '0; fd = 0; nout = 0;
      a = new[NPIX];
      for (int f = 0; f < NFR; f++) begin
        for (int p = 0; p < NPIX; p++) begin
          pix_t base;
          base = pix_t'($urandom);
          a[p].img_prev = base;
          a[p].img_cur  = ($urandom_range(0, 3) == 0) ? pix_t'($urandom) : base;
          a[p].img_next = ($urandom_range(0, 2) == 0) ? pix_t'($urandom) : base;
          a[p].bg       = ($urandom_range(0, 1) == 0) ? pix_t'($urandom) : a[p].img_cur;
          a[p].count    = (p % 11 == 0) ? 8'hff : 8'($urandom_range(0, 9));
          a[p].road     = ($urandom_range(0, 4) != 0);
          a[p].area     = 16'($urandom_range(1, 5000));
          a[p].region   = 2'($urandom_range(0, NR - 1));
          fr[f][p] = a[p];
        end
        bgs_ref(NPIX, 10, 1, 2, 1, LAT_TH, BG_TH, NF, a, o, ta, tc);
        for (int p = 0; p < NPIX; p++) eo[f][p] = o[p];
        for (int r = 0; r < 4; r++) begin ea[f][r] = ta[r]; ec[f][r] = tc[r]; end
      end
      n_ready++;
      wait (rst_n);
      for (int f = 0; f < NFR; f++) begin
        sent = 0;
        while (sent < NPIX) begin
          @(negedge clk);
          v   = (f == 0) ? 1'b1 : ($urandom_range(0, i + 1) != 0);
          pix = fr[f][sent];
          @(posedge clk);
          if (v && bgs_in_ready[i]) sent++;
          else if (v) n_bstall++;
        end
      end
      @(negedge clk);
      v = 0;
    end

    always @(posedge clk) if (rst_n) begin
      if (bgs_out_valid[i]) begin
        if (fd < NFR && nout < NPIX) begin
          check(bgs_out_pix[i] == eo[fd][nout],
                $sformatf("bgs %0d frame %0d pixel %0d: %h expected %h", i, fd, nout, bgs_out_pix[i], eo[fd][nout]));
          if (eo[fd][nout].moving) n_moving++;
          if (eo[fd][nout].bg != fr[fd][nout].bg) n_bgupd++;
          if (fr[fd][nout].count == 8'hff && eo[fd][nout].count == 8'hff) n_sat++;
        end
        nout++;
      end
      if (bgs_frame_done[i]) begin
        check(nout == NPIX, $sformatf("bgs %0d frame %0d: %0d outputs", i, fd, nout));
        if (fd < NFR)
          for (int r = 0; r < NR; r++) begin
            check(bgs_area_sum[i][r] == 40'(ea[fd][r]), $sformatf("bgs %0d region %0d area", i, r));
            check(bgs_moving_count[i][r] == 24'(ec[fd][r]), $sformatf("bgs %0d region %0d count", i, r));
          end
        fd++;
        nout = 0;
        n_bdone++;
      end
    end
  end

  // ----------------------------------------------------------------- LK ----
  for (genvar j = 0; j < NL; j++) begin : g_l
    pix_t   i0 [NPIX], i1 [NPIX];
    int     evx [NPIX], evy [NPIX];
    longint es [NR];
    int     ecn [NR];
    int     fd, nout;
    logic   v;
    lk_in_t pix;
    assign lk_in_valid[j] = v;
    assign lk_in_pix[j]   = pix;

    initial begin : drive
      pix_t a0[], a1[];
      int   vx[], vy[];
      int   sent, s;
      v = 0; pix = '0; fd = 0; nout = 0;
      s = (j % 2 == 0) ? 1 : 2;
      a0 = new[NPIX]; a1 = new[NPIX];
      for (int p = 0; p < NPIX; p++) begin
        int x, y;
        x = p % W; y = p / W;
        if (y < 10) begin
          a0[p] = 8'd100; a1[p] = 8'd100;
        end else begin
          a0[p] = pattern(x, y, j, 0);
          a1[p] = pattern(x, y, j, (lk_region(p) == 0) ? s : -s);
        end
        i0[p] = a0[p]; i1[p] = a1[p];
      end
      lk_ref(W, H, 15, DET_MIN, a0, a1, vx, vy);
      for (int r = 0; r < NR; r++) begin es[r] = 0; ecn[r] = 0; end
      for (int p = 0; p < NPIX; p++) begin
        evx[p] = vx[p]; evy[p] = vy[p];
        if (lk_on_road(p) && (vy[p] >= VMIN || vy[p] <= -VMIN)) begin
          es[lk_region(p)]  += longint'(vy[p]) * lk_dist(p);
          ecn[lk_region(p)] += 1;
        end
      end
      n_ready++;
      wait (rst_n);
      for (int f = 0; f < NFR; f++) begin
        sent = 0;
        while (sent < NPIX) begin
          @(negedge clk);
          v   = (f == 0) ? 1'b1 : ($urandom_range(0, j + 1) != 0);
          pix = '{img0: i0[sent], img1: i1[sent], road: lk_on_road(sent),
                  dist_mm: dist_t'(lk_dist(sent)), region: region_t'(lk_region(sent))};
          @(posedge clk);
          if (v && lk_in_ready[j]) sent++;
          else if (v) n_lstall++;
        end
      end
      @(negedge clk);
      v = 0;
    end

    always @(posedge clk) if (rst_n) begin
      if (lk_out_valid[j]) begin
        if (nout < NPIX) begin
          check(int'(lk_out_pix[j].vx) == evx[nout] && int'(lk_out_pix[j].vy) == evy[nout],
                $sformatf("lk %0d pixel %0d: %0d,%0d expected %0d,%0d", j, nout,
                          lk_out_pix[j].vx, lk_out_pix[j].vy, evx[nout], evy[nout]));
          if (evx[nout] == 0 && evy[nout] == 0) n_zero++;
          if (lk_out_pix[j].moving && evy[nout] > 0) n_towards++;
          if (lk_out_pix[j].moving && evy[nout] < 0) n_away++;
        end
        nout++;
      end
      if (lk_frame_done[j]) begin
        check(nout == NPIX, $sformatf("lk %0d frame %0d: %0d outputs", j, fd, nout));
        for (int r = 0; r < NR; r++) begin
          check(lk_speed_sum[j][r] == 56'(es[r]), $sformatf("lk %0d region %0d speed sum %0d expected %0d", j, r, lk_speed_sum[j][r], es[r]));
          check(lk_moving_count[j][r] == 24'(ecn[r]), $sformatf("lk %0d region %0d count", j, r));
        end
        fd++;
        nout = 0;
        n_ldone++;
      end
    end
  end

  // ------------------------------------------------------------ control ----
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    wait (n_ready == NB + NL);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_bdone == NB * NFR && n_ldone == NL * NFR);
    repeat (5) @(posedge clk);
    check(n_moving  > 0, "no moving pixel");
    check(n_bgupd   > 0, "no background update");
    check(n_sat     > 0, "no saturated frame counter");
    check(n_bstall  > 0, "background units never held input off");
    check(n_zero    > 0, "no flow forced to zero");
    check(n_towards > 0, "no motion towards the camera");
    check(n_away    > 0, "no motion away from the camera");
    check(n_lstall  > 0, "flow units never held input off");
    $display("cycles=%0d bgs: frames=%0d moving=%0d bg_updates=%0d saturated=%0d stalls=%0d",
             cyc, n_bdone, n_moving, n_bgupd, n_sat, n_bstall);
    $display("lk: frames=%0d zero_flow=%0d towards=%0d away=%0d stalls=%0d",
             n_ldone, n_zero, n_towards, n_away, n_lstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (n_ready == NB + NL);
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
