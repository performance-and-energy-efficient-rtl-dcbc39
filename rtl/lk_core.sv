// lk_core: Lucas-Kanade optical-flow compute unit (traffic speed).
//
// Takes two consecutive frames as one raster stream of pixel pairs and
// produces, for every pixel, the flow vector (vx, vy) over a WIN x WIN
// window, a debug colour, and per road region the sum of the speeds of the
// moving road pixels in the camera direction.
//
// Data path, one pixel per clock:
//   line buffers of frame 0 (2 rows) and frame 1 (1 row)
//     -> lk_gradient: 2*Ix, 2*Iy, It of the pixel one row and one column back
//     -> lk_window_sum: derivative line buffer, vertical then horizontal
//        window sums of the five normal-equation terms
//     -> lk_solver: v = -G^-1 b in fixed point
//     -> speed and colour: a pixel is moving when it is on the road and
//        |vy| >= v_min; its speed vy * dist_mm (Q.VFRAC mm per frame, positive
//        towards the camera) is added to its region's total; the colour comes
//        from flow_color_map.
// The road description of each pixel waits in a FIFO until that pixel's
// flow leaves the solver.
//
// Raster timing: the unit walks an extended raster of (WIDTH+HALF+1) x
// (HEIGHT+HALF+2) positions, HALF = WIN/2. At image positions it needs an
// input pixel (in_ready high, it waits for in_valid); at the extra positions
// right of each row and below the last row it runs on its own with in_ready
// low, so that the windows at the right and bottom edges are completed and
// the pipeline is drained before the next frame. A 1280x720 frame so takes
// 1288*729 = 938,952 cycles when the input never stalls. Outputs come in raster
// order as single-cycle out_valid pulses (no back-pressure), about
// HALF+1 rows plus LK latency after their input; frame_done pulses one cycle
// after the last pixel's output, with the per-region speed sums and
// moving-pixel counts (average speed = sum / count / 2^VFRAC mm per frame).
//
// From the source design: window size 15, 1280x720 8-bit frames, the
// derivative definitions, the two-pass window sum with a derivative line
// buffer, the per-pixel distance used for the speed, and the linear debug
// colour map. This implementation's choices: the clamp and zero borders,
// fixed-point formats, the determinant threshold DET_MIN and v_min test, and
// the single-level (no image pyramid) solution.
module lk_core import sc_pkg::*; #(
  parameter int unsigned WIDTH       = 1280,
  parameter int unsigned HEIGHT      = 720,
  parameter int unsigned WIN         = 15,
  parameter int unsigned NUM_REGIONS = 2,
  parameter longint      DET_MIN     = 64'd65536,
  parameter int unsigned COLOR_SHIFT = 2,
  parameter int unsigned ACC_W       = 56,
  parameter int unsigned CNT_W       = 24
) (
  input  logic     clk,
  input  logic     rst_n,
  // run-time setting: smallest |vy| (Q.VFRAC pixels per frame) counted as motion
  input  vel_t     v_min,
  // pixel stream
  input  logic     in_valid,
  output logic     in_ready,
  input  lk_in_t   in_pix,
  output logic     out_valid,
  output lk_out_t  out_pix,
  // per-frame results
  output logic                                     frame_done,
  output logic signed [NUM_REGIONS-1:0][ACC_W-1:0] speed_sum,
  output logic [NUM_REGIONS-1:0][CNT_W-1:0]        moving_count
);

  localparam int unsigned HALF  = WIN / 2;
  localparam int unsigned XEXT  = WIDTH + HALF + 1;
  localparam int unsigned YEXT  = HEIGHT + HALF + 2;
  localparam int unsigned CW    = $clog2(WIDTH + 2 * WIN) + 1;
  localparam int unsigned RW    = $clog2(HEIGHT + 2 * WIN) + 1;
  localparam int unsigned AW    = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned FDEPTH = (HALF + 2) * WIDTH;

  // ---- raster walk --------------------------------------------------------
  logic signed [CW-1:0] xs;
  logic signed [RW-1:0] ys;
  logic                 in_img, tick;

  assign in_img   = (xs < CW'(WIDTH)) && (ys < RW'(HEIGHT));
  assign in_ready = in_img;
  assign tick     = in_img ? in_valid : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= '0;
      ys <= '0;
    end else if (tick) begin
      if (xs == CW'(XEXT - 1)) begin
        xs <= '0;
        ys <= (ys == RW'(YEXT - 1)) ? '0 : ys + 1'b1;
      end else begin
        xs <= xs + 1'b1;
      end
    end
  end

  // ---- line buffers of the two frames -------------------------------------
  logic [1:0][PIX_W-1:0] lb0_q;
  logic [0:0][PIX_W-1:0] lb1_q;
  pix_t                  new0, new1;

  assign new0 = in_img ? in_pix.img0 : '0;
  assign new1 = in_img ? in_pix.img1 : '0;

  line_buffer #(.WIDTH(WIDTH), .ROWS(2), .DW(PIX_W)) u_lb_img0 (
    .clk (clk), .en (tick && (xs < CW'(WIDTH))), .addr (AW'(xs)), .din (new0), .dout (lb0_q)
  );
  line_buffer #(.WIDTH(WIDTH), .ROWS(1), .DW(PIX_W)) u_lb_img1 (
    .clk (clk), .en (tick && (xs < CW'(WIDTH))), .addr (AW'(xs)), .din (new1), .dout (lb1_q)
  );

  // s1: column xs of rows ys, ys-1, ys-2 (frame 0) and ys-1 (frame 1)
  // d1: the same one column earlier; d2_mid: row ys-1 two columns earlier
  logic signed [CW-1:0] s1_x;
  logic signed [RW-1:0] s1_y;
  pix_t                 s1_p0;
  pix_t                 d1_p0, d1_r1, d1_r2, d1_i1, d2_r1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_x  <= '0;
      s1_y  <= '0;
      s1_p0 <= '0;
      d1_p0 <= '0;
      d1_r1 <= '0;
      d1_r2 <= '0;
      d1_i1 <= '0;
      d2_r1 <= '0;
    end else if (tick) begin
      s1_x  <= xs;
      s1_y  <= ys;
      s1_p0 <= new0;
      d1_p0 <= s1_p0;
      d1_r1 <= lb0_q[0];
      d1_r2 <= lb0_q[1];
      d1_i1 <= lb1_q[0];
      d2_r1 <= d1_r1;
    end
  end

  // ---- derivatives of pixel (s1_x-1, s1_y-1) ------------------------------
  logic signed [CW-1:0] gxp;
  logic signed [RW-1:0] gyp;
  logic                 g_in;
  lk_grad_t             grad, grad_m;

  assign gxp  = s1_x - 1'b1;
  assign gyp  = s1_y - 1'b1;
  assign g_in = (gxp >= 0) && (gxp < CW'(WIDTH)) && (gyp >= 0) && (gyp < RW'(HEIGHT));

  lk_gradient u_grad (
    .center    (d1_r1),
    .left      (d2_r1),
    .right     (lb0_q[0]),
    .up        (d1_r2),
    .down      (d1_p0),
    .im1       (d1_i1),
    .at_left   (gxp == 0),
    .at_right  (gxp == CW'(WIDTH - 1)),
    .at_top    (gyp == 0),
    .at_bottom (gyp == RW'(HEIGHT - 1)),
    .grad      (grad)
  );

  assign grad_m = g_in ? grad : '0;

  // ---- window sums --------------------------------------------------------
  logic                 ws_valid;
  logic signed [CW-1:0] ws_x;
  logic signed [RW-1:0] ws_y;
  lk_sums_t             ws_sums;

  lk_window_sum #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .WIN(WIN)) u_win (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (tick),
    .x         (gxp),
    .y         (gyp),
    .g         (grad_m),
    .out_valid (ws_valid),
    .out_x     (ws_x),
    .out_y     (ws_y),
    .sums      (ws_sums)
  );

  // ---- road description of each pixel, waiting for its flow -------------
  lk_cfg_t cfg_in, cfg_out;
  logic    cfg_empty, cfg_full;

  assign cfg_in = '{road:    in_pix.road,
                    dist_mm: in_pix.dist_mm,
                    region:  in_pix.region,
                    last:    (xs == CW'(WIDTH - 1)) && (ys == RW'(HEIGHT - 1))};

  sync_fifo #(.DEPTH(FDEPTH), .DW($bits(lk_cfg_t))) u_cfg_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (in_valid && in_ready),
    .din   (cfg_in),
    .pop   (ws_valid),
    .dout  (cfg_out),
    .empty (cfg_empty),
    .full  (cfg_full)
  );

  // ---- flow ---------------------------------------------------------------
  logic    sv_valid;
  vel_t    vx, vy;
  lk_cfg_t sv_cfg;

  lk_solver #(.SBW($bits(lk_cfg_t)), .DET_MIN(DET_MIN)) u_solver (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ws_valid),
    .sums      (ws_sums),
    .in_sb     (cfg_out),
    .out_valid (sv_valid),
    .vx        (vx),
    .vy        (vy),
    .out_sb    (sv_cfg)
  );

  // ---- speed, colour ------------------------------------------------------
  logic [23:0]                      rgb;
  logic                             moving;
  vel_t                             vy_abs;
  logic signed [VEL_W+DIST_W:0]     speed;

  flow_color_map #(.SHIFT(COLOR_SHIFT)) u_color (.vx (vx), .vy (vy), .rgb (rgb));

  assign vy_abs = vy[VEL_W-1] ? -vy : vy;
  assign moving = sv_cfg.road && (vy_abs >= v_min) && (vy != 0);
  assign speed  = (VEL_W+DIST_W+1)'(vy) * $signed({1'b0, sv_cfg.dist_mm});

  region_accum #(
    .NUM_REGIONS (NUM_REGIONS),
    .REGION_W    (REGION_W),
    .VAL_W       (VEL_W + DIST_W + 1),
    .ACC_W       (ACC_W),
    .CNT_W       (CNT_W)
  ) u_speed (
    .clk       (clk),
    .rst_n     (rst_n),
    .add_valid (sv_valid && moving),
    .region    (sv_cfg.region),
    .value     (speed),
    .frame_end (sv_valid && sv_cfg.last),
    .done      (frame_done),
    .sum       (speed_sum),
    .count     (moving_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= sv_valid;
      if (sv_valid) out_pix <= '{vx: vx, vy: vy, rgb: rgb, moving: moving};
    end
  end

  // every window result has the road description of its pixel waiting
  a_cfg_present: assert property (@(posedge clk) disable iff (!rst_n) ws_valid |-> !cfg_empty);
  a_cfg_order:   assert property (@(posedge clk) disable iff (!rst_n)
    (ws_valid && cfg_out.last) |-> (ws_x == CW'(WIDTH - 1)) && (ws_y == RW'(HEIGHT - 1)));
  a_cfg_room:    assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |-> !cfg_full);

endmodule
