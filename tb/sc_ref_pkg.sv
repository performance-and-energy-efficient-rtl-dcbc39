// sc_ref_pkg: software reference models of the two kernels, written
// directly from the per-pixel algorithm over whole frames (plain loops over
// linear pixel indices and windows), for the testbenches to compare against.
package sc_ref_pkg;
  import sc_pkg::*;

  // Background subtraction over one frame of npix pixels.
  function automatic void bgs_ref(input int npix, input int offset,
                                  input int wl, input int wc, input int wr,
                                  input int lat_th, input int bg_th, input int n_frames,
                                  ref bgs_in_t pin[], ref bgs_out_t pout[],
                                  ref longint area[4], ref int cnt[4]);
    for (int r = 0; r < 4; r++) begin area[r] = 0; cnt[r] = 0; end
    pout = new[npix];
    for (int p = 0; p < npix; p++) begin
      int dl, dc, dr, s, lat, bgd;
      bit still, mv;
      dc = int'(pin[p].img_next) - int'(pin[p].img_prev);
      dl = (p - offset >= 0)   ? int'(pin[p-offset].img_next) - int'(pin[p-offset].img_prev) : 0;
      dr = (p + offset < npix) ? int'(pin[p+offset].img_next) - int'(pin[p+offset].img_prev) : 0;
      s   = wl * dl + wc * dc + wr * dr;
      lat = pin[p].road ? (s < 0 ? -s : s) : 0;
      still = lat < lat_th;
      bgd = int'(pin[p].img_cur) - int'(pin[p].bg);
      if (bgd < 0) bgd = -bgd;
      mv = (bgd > bg_th) && (lat > lat_th);
      pout[p].moving  = mv;
      pout[p].img_out = mv ? pin[p].img_cur : 8'd0;
      if (still && int'(pin[p].count) >= n_frames) begin
        pout[p].bg    = pin[p].img_cur;
        pout[p].count = pin[p].count;
      end else begin
        pout[p].bg    = pin[p].bg;
        pout[p].count = (pin[p].count == 8'hff) ? 8'hff : pin[p].count + 8'd1;
      end
      if (mv && pin[p].region < 2'd2) begin
        area[pin[p].region] += longint'(pin[p].area);
        cnt[pin[p].region]  += 1;
      end
    end
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Single-level Lucas-Kanade flow of frame pair (i0, i1), w x h pixels,
  // window win x win; results in Q.8 pixels per frame.
  function automatic void lk_ref(input int w, input int h, input int win, input longint det_min,
                                 ref pix_t i0[], ref pix_t i1[],
                                 ref int vx[], ref int vy[]);
    int gx[], gy[], gt[];
    int half = win / 2;
    gx = new[w*h]; gy = new[w*h]; gt = new[w*h];
    vx = new[w*h]; vy = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int p = y*w + x;
        gx[p] = int'(i0[y*w + clampi(x+1,0,w-1)]) - int'(i0[y*w + clampi(x-1,0,w-1)]);
        gy[p] = int'(i0[clampi(y+1,0,h-1)*w + x]) - int'(i0[clampi(y-1,0,h-1)*w + x]);
        gt[p] = int'(i1[p]) - int'(i0[p]);
      end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        longint sxx = 0, sxy = 0, syy = 0, sxt = 0, syt = 0;
        longint det, nx, ny, qx, qy;
        for (int v = y-half; v <= y+half; v++)
          for (int u = x-half; u <= x+half; u++)
            if (u >= 0 && u < w && v >= 0 && v < h) begin
              int q = v*w + u;
              sxx += gx[q]*gx[q]; sxy += gx[q]*gy[q]; syy += gy[q]*gy[q];
              sxt += gx[q]*gt[q]; syt += gy[q]*gt[q];
            end
        det = sxx*syy - sxy*sxy;
        nx  = -2*(syy*sxt - sxy*syt);
        ny  = -2*(sxx*syt - sxy*sxt);
        if (det <= det_min) begin
          vx[y*w+x] = 0; vy[y*w+x] = 0;
        end else begin
          qx = ((nx < 0 ? -nx : nx) <<< 8) / det;
          qy = ((ny < 0 ? -ny : ny) <<< 8) / det;
          if (qx > 32767) qx = 32767;
          if (qy > 32767) qy = 32767;
          vx[y*w+x] = int'(nx < 0 ? -qx : qx);
          vy[y*w+x] = int'(ny < 0 ? -qy : qy);
        end
      end
  endfunction

  // Textured test image: a smooth pattern of period about 8 to 12 pixels
  // shifted by (dx, dy) pixels, values 20..235.
  function automatic pix_t pattern(input int x, input int y, input int dx, input int dy);
    real xf = real'(x - dx), yf = real'(y - dy);
    real v  = 128.0 + 60.0 * $sin(xf * 0.61) + 45.0 * $cos(yf * 0.53) + 20.0 * $sin((xf + yf) * 0.37);
    return pix_t'(clampi(int'(v), 20, 235));
  endfunction

endpackage
