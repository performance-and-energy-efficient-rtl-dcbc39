// sc_pkg: types and widths shared by the traffic-video kernels.
//
// Both compute units work on 8-bit grayscale pixels streamed in raster order.
// Each pixel of a camera frame travels together with its static road
// description: whether the pixel lies on the road, how much road area it
// covers, how much road length it covers in the camera direction and which
// road region (carriageway side or lane) it belongs to. That description is
// computed once per fixed camera and re-used for every frame.
// The pixel depth (8 bits) follows the source design; every other width here
// is a choice of this implementation.
package sc_pkg;

  localparam int unsigned PIX_W    = 8;   // grayscale pixel
  localparam int unsigned COUNT_W  = 8;   // per-pixel stationary-frame counter
  localparam int unsigned AREA_W   = 16;  // road area covered by one pixel (cm^2)
  localparam int unsigned DIST_W   = 16;  // road length covered by one pixel (mm)
  localparam int unsigned REGION_W = 2;   // road region id, up to 4 regions
  localparam int unsigned LAT_W    = 11;  // |weighted temporal difference| (max 4*255)

  // Lucas-Kanade fixed-point formats
  localparam int unsigned GRAD_W   = 9;   // 2*Ix, 2*Iy and It, signed
  localparam int unsigned SUM_W    = 32;  // 15x15 window sums, signed
  localparam int unsigned VFRAC    = 8;   // fractional bits of a flow component
  localparam int unsigned VEL_W    = 16;  // flow component, signed Q7.8 pixels/frame

  typedef logic [PIX_W-1:0]    pix_t;
  typedef logic [COUNT_W-1:0]  count_t;
  typedef logic [AREA_W-1:0]   area_t;
  typedef logic [DIST_W-1:0]   dist_t;
  typedef logic [REGION_W-1:0] region_t;
  typedef logic [LAT_W-1:0]    lat_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic signed [SUM_W-1:0]  sum_t;
  typedef logic signed [VEL_W-1:0]  vel_t;

  // One pixel position of the background-subtraction stream: the previous,
  // current and next frame, the stored background and its counter, and the
  // static road description of the pixel.
  typedef struct packed {
    pix_t    img_prev;
    pix_t    img_cur;
    pix_t    img_next;
    pix_t    bg;
    count_t  count;
    logic    road;
    area_t   area;
    region_t region;
  } bgs_in_t;

  // Result for one pixel: foreground image, updated background and counter.
  typedef struct packed {
    pix_t   img_out;
    pix_t   bg;
    count_t count;
    logic   moving;
  } bgs_out_t;

  // One pixel position of the optical-flow stream: two consecutive frames
  // and the static road description.
  typedef struct packed {
    pix_t    img0;
    pix_t    img1;
    logic    road;
    dist_t   dist_mm;
    region_t region;
  } lk_in_t;

  // Static road description carried alongside the flow computation.
  typedef struct packed {
    logic    road;
    dist_t   dist_mm;
    region_t region;
    logic    last;      // last pixel of the frame
  } lk_cfg_t;

  // Derivatives of one pixel: gx = 2*Ix, gy = 2*Iy, gt = It = I1 - I0.
  typedef struct packed {
    grad_t gx;
    grad_t gy;
    grad_t gt;
  } lk_grad_t;

  // Window sums of the normal equations (in units of the doubled gradients).
  typedef struct packed {
    sum_t sxx;
    sum_t sxy;
    sum_t syy;
    sum_t sxt;
    sum_t syt;
  } lk_sums_t;

  typedef struct packed {
    vel_t        vx;
    vel_t        vy;
    logic [23:0] rgb;     // debug colour, {R,G,B}
    logic        moving;  // on the road and |vy| above the speed threshold
  } lk_out_t;

endpackage
