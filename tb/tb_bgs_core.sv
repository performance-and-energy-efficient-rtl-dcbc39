// tb_bgs_core: self-checking test of the background-subtraction unit.
// Streams random frames (with and without input gaps) through a 16x6 unit
// with the full +-10 neighbour offset and compares every output pixel, the
// per-region moving area and counts with the reference model. It also checks
// the frame time (WIDTH*HEIGHT + OFFSET cycles with gap-free input).
module tb_bgs_core;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int W = 16, H = 6, NPIX = W*H, OFFSET = 10;
  localparam int LAT_TH = 40, BG_TH = 20, NF = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, frame_done;
  bgs_in_t in_pix;
  bgs_out_t out_pix;
  logic signed [1:0][39:0] area_sum;
  logic [1:0][23:0] moving_count;

  bgs_core #(.WIDTH(W), .HEIGHT(H), .OFFSET(OFFSET), .NUM_REGIONS(2)) dut (
    .clk, .rst_n,
    .lat_threshold (LAT_W'(LAT_TH)), .bg_threshold (8'(BG_TH)), .n_frames (8'(NF)),
    .in_valid, .in_ready, .in_pix, .out_valid, .out_pix,
    .frame_done, .area_sum, .moving_count);

  int checks = 0, failures = 0;
  int n_moving = 0, n_bgupd = 0, n_sat = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  localparam int NFR = 6;
  bgs_in_t  frames   [NFR][NPIX];
  bgs_out_t expect_o [NFR][NPIX];
  longint   e_area [NFR][4];
  int       e_cnt  [NFR][4];
  bgs_out_t got[$];
  int       frames_done = 0;
  int       t_first = -1, t_done[NFR];
  int       cyc = 0;
  bit       sending_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic pix_t rp();
    return pix_t'($urandom_range(0, 255));
  endfunction

  function automatic void make_frame(input int f);
    for (int p = 0; p < NPIX; p++) begin
      pix_t base = rp();
      frames[f][p].img_prev = base;
      frames[f][p].img_cur  = ($urandom_range(0, 3) == 0) ? rp() : base;
      frames[f][p].img_next = ($urandom_range(0, 2) == 0) ? rp() : base;
      frames[f][p].bg       = ($urandom_range(0, 1) == 0) ? rp() : frames[f][p].img_cur;
      frames[f][p].count    = (f % 2 == 1 && p % 7 == 0) ? 8'hff : 8'($urandom_range(0, 9));
      frames[f][p].road     = ($urandom_range(0, 4) != 0);
      frames[f][p].area     = 16'($urandom_range(1, 5000));
      frames[f][p].region   = 2'($urandom_range(0, 3));
    end
  endfunction

  // collect outputs; on frame_done (which comes with the last pixel) check the frame
  always @(posedge clk) if (rst_n) begin
    if (out_valid) got.push_back(out_pix);
    if (frame_done && frames_done < NFR) begin
      int f;
      f = frames_done;
      t_done[f] = cyc;
      check(got.size() == NPIX, $sformatf("frame %0d: %0d outputs", f, got.size()));
      for (int p = 0; p < NPIX && p < got.size(); p++) begin
        check(got[p] == expect_o[f][p], $sformatf("frame %0d pixel %0d got %h expected %h", f, p, got[p], expect_o[f][p]));
        if (expect_o[f][p].moving) n_moving++;
        if (expect_o[f][p].bg != frames[f][p].bg) n_bgupd++;
        if (frames[f][p].count == 8'hff && expect_o[f][p].count == 8'hff) n_sat++;
      end
      for (int r = 0; r < 2; r++) begin
        check(area_sum[r] == 40'(e_area[f][r]), $sformatf("frame %0d region %0d area %0d expected %0d", f, r, area_sum[r], e_area[f][r]));
        check(moving_count[r] == 24'(e_cnt[f][r]), $sformatf("frame %0d region %0d count", f, r));
      end
      got.delete();
      frames_done++;
    end
  end

  initial begin
    in_valid = 0; in_pix = '0;
    for (int f = 0; f < NFR; f++) begin
      bgs_in_t fr[];
      bgs_out_t eo[];
      longint ea[4];
      int ec[4];
      make_frame(f);
      fr = new[NPIX];
      foreach (fr[p]) fr[p] = frames[f][p];
      bgs_ref(NPIX, OFFSET, 1, 2, 1, LAT_TH, BG_TH, NF, fr, eo, ea, ec);
      foreach (eo[p]) expect_o[f][p] = eo[p];
      for (int r = 0; r < 4; r++) begin
        e_area[f][r] = ea[r];
        e_cnt[f][r]  = ec[r];
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frames 0..2 back to back with no gaps, frames 3..5 with random gaps
    for (int f = 0; f < NFR; f++) begin
      int sent;
      sent = 0;
      while (sent < NPIX) begin
        @(negedge clk);
        in_valid = (f < 3) ? 1'b1 : ($urandom_range(0, 2) != 0);
        in_pix   = frames[f][sent];
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (f == 0 && sent == 0) t_first = cyc;
          sent++;
        end else if (in_valid) n_stall++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (frames_done == NFR);
    // gap-free back-to-back frames: WIDTH*HEIGHT + OFFSET cycles each
    check(t_done[0] - t_first == NPIX + OFFSET, $sformatf("first frame %0d cycles", t_done[0] - t_first));
    check(t_done[1] - t_done[0] == NPIX + OFFSET, $sformatf("frame period %0d cycles", t_done[1] - t_done[0]));
    check(t_done[2] - t_done[1] == NPIX + OFFSET, $sformatf("frame period %0d cycles", t_done[2] - t_done[1]));
    check(n_moving > 0,  "no moving pixel seen");
    check(n_bgupd > 0,   "no background update seen");
    check(n_sat > 0,     "no saturated counter seen");
    check(n_stall > 0,   "input never held off during the flush");
    $display("moving=%0d bg_updates=%0d saturated=%0d stalls=%0d", n_moving, n_bgupd, n_sat, n_stall);
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
