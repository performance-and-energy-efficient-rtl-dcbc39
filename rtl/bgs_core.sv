// bgs_core: background-subtraction compute unit (traffic density).
//
// For every pixel of the current frame the unit decides whether it shows
// something moving on the road, keeps a reference background image up to
// date and adds the road area of moving pixels to per-region totals.
//
// Algorithm (per pixel PIX of the current frame, in raster order):
//   lat  = |WL*d(PIX-OFFSET) + WC*d(PIX) + WR*d(PIX+OFFSET)|  on road, else 0
//          with d(p) = next[p] - prev[p], the change between the frames
//          before and after the current one, and d = 0 outside the frame
//   if lat < lat_threshold and count >= n_frames:  bg <= cur
//   else                                            count <= count + 1 (saturating)
//   moving = |cur - bg| > bg_threshold and lat > lat_threshold
//   img_out = moving ? cur : 0, and a moving pixel adds its road area to
//   the total of its region.
// The +-10 pixel neighbours, the two thresholds, the counter test and the
// foreground rule follow the source algorithm. The neighbour weights
// (1,2,1), the use of next-minus-previous as the weighted difference and the
// absolute value in the background test are this implementation's reading.
//
// Structure: the stream passes through a shift register of 2*OFFSET pixels,
// so that when pixel PIX+OFFSET arrives, pixel PIX is the centre and pixel
// PIX-OFFSET the left neighbour. After the last pixel of a frame the unit
// drops in_ready for OFFSET cycles and shifts in empty entries to finish the
// last OFFSET pixels.
//
// Interface: in_valid/in_ready handshake, one pixel position (all four images
// plus the stored counter and road description) per accepted transfer. The
// result of each pixel comes out one cycle after it became the centre, as a
// single-cycle out_valid pulse with no back-pressure. Throughput is one pixel
// per clock; a frame of WIDTH*HEIGHT pixels takes WIDTH*HEIGHT+OFFSET cycles.
// frame_done pulses one cycle after the last out_valid of a frame, with the
// per-region area totals (sum of area fields) and moving-pixel counts.
module bgs_core import sc_pkg::*; #(
  parameter int unsigned WIDTH       = 1280,
  parameter int unsigned HEIGHT      = 720,
  parameter int unsigned OFFSET      = 10,
  parameter int unsigned NUM_REGIONS = 2,
  parameter int          WL          = 1,
  parameter int          WC          = 2,
  parameter int          WR          = 1,
  parameter int unsigned ACC_W       = 40,
  parameter int unsigned CNT_W       = 24
) (
  input  logic      clk,
  input  logic      rst_n,
  // run-time settings
  input  lat_t      lat_threshold,
  input  pix_t      bg_threshold,
  input  count_t    n_frames,
  // pixel stream
  input  logic      in_valid,
  output logic      in_ready,
  input  bgs_in_t   in_pix,
  output logic      out_valid,
  output bgs_out_t  out_pix,
  // per-frame results
  output logic                                     frame_done,
  output logic signed [NUM_REGIONS-1:0][ACC_W-1:0] area_sum,
  output logic [NUM_REGIONS-1:0][CNT_W-1:0]        moving_count
);

  localparam int unsigned NPIX  = WIDTH * HEIGHT;
  localparam int unsigned PW    = $clog2(NPIX + 1);
  localparam int unsigned DEPTH = 2 * OFFSET;

  typedef struct packed {
    logic    v;
    bgs_in_t d;
  } ent_t;

  ent_t          sr [DEPTH];
  logic [PW-1:0] in_cnt;   // pixels accepted in this frame
  logic [PW-1:0] c_cnt;    // pixels finished in this frame
  logic          flushing;
  logic          shift;
  ent_t          incoming, center, left;
  logic          left_ok, last;

  assign flushing = (in_cnt == PW'(NPIX));
  assign in_ready = !flushing;
  assign shift    = flushing || in_valid;
  assign incoming = '{v: !flushing, d: in_pix};
  assign center   = sr[OFFSET-1];
  assign left     = sr[DEPTH-1];
  assign left_ok  = left.v && (c_cnt >= PW'(OFFSET));
  assign last     = (c_cnt == PW'(NPIX - 1));

  // ---- per-pixel decision -------------------------------------------------
  typedef logic signed [PIX_W+1:0] diff_t;
  diff_t                    d_l, d_c, d_r;
  logic signed [LAT_W+1:0]  wsum;
  lat_t                     lat;
  logic                     still, moving;
  logic [PIX_W-1:0]         bg_diff;
  bgs_out_t                 res;

  always_comb begin
    d_c = diff_t'(center.d.img_next) - diff_t'(center.d.img_prev);
    d_l = left_ok ? diff_t'(left.d.img_next) - diff_t'(left.d.img_prev) : '0;
    d_r = incoming.v ? diff_t'(incoming.d.img_next) - diff_t'(incoming.d.img_prev) : '0;
    wsum = (LAT_W+2)'(WL) * (LAT_W+2)'(d_l) + (LAT_W+2)'(WC) * (LAT_W+2)'(d_c)
         + (LAT_W+2)'(WR) * (LAT_W+2)'(d_r);
    if (!center.d.road)  lat = '0;
    else if (wsum < 0)   lat = LAT_W'(-wsum);
    else                 lat = LAT_W'(wsum);

    still   = (lat < lat_threshold);
    bg_diff = (center.d.img_cur > center.d.bg) ? center.d.img_cur - center.d.bg
                                                : center.d.bg - center.d.img_cur;
    moving  = (bg_diff > bg_threshold) && (lat > lat_threshold);

    res.moving  = moving;
    res.img_out = moving ? center.d.img_cur : '0;
    if (still && (center.d.count >= n_frames)) begin
      res.bg    = center.d.img_cur;
      res.count = center.d.count;
    end else begin
      res.bg    = center.d.bg;
      res.count = (&center.d.count) ? center.d.count : center.d.count + 1'b1;
    end
  end

  // ---- stream control -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      in_cnt    <= '0;
      c_cnt     <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (shift) begin
        sr[0] <= incoming;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
        if (!flushing) in_cnt <= in_cnt + 1'b1;
        if (center.v) begin
          out_valid <= 1'b1;
          out_pix   <= res;
          if (last) begin
            c_cnt  <= '0;
            in_cnt <= '0;
          end else begin
            c_cnt <= c_cnt + 1'b1;
          end
        end
      end
    end
  end

  region_accum #(
    .NUM_REGIONS (NUM_REGIONS),
    .REGION_W    (REGION_W),
    .VAL_W       (AREA_W + 1),
    .ACC_W       (ACC_W),
    .CNT_W       (CNT_W)
  ) u_area (
    .clk       (clk),
    .rst_n     (rst_n),
    .add_valid (shift && center.v && moving),
    .region    (center.d.region),
    .value     ((AREA_W+1)'(center.d.area)),
    .frame_end (shift && center.v && last),
    .done      (frame_done),
    .sum       (area_sum),
    .count     (moving_count)
  );

  // a frame never holds more than WIDTH*HEIGHT pixels
  a_frame_count: assert property (@(posedge clk) disable iff (!rst_n)
    (in_cnt <= PW'(NPIX)) && (c_cnt < PW'(NPIX)));

endmodule
