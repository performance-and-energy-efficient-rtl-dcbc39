// smart_city_top: FPGA accelerator for camera-based traffic monitoring.
//
// A central server receives the video of many fixed road cameras and must,
// for each camera, report in real time (25 frames/s of 1280x720 8-bit
// grayscale) how much of the road is occupied by moving vehicles and how
// fast they move. This top holds the two kinds of compute unit side by side:
//   NUM_BGS_CU background-subtraction units (bgs_core): moving area per
//     road region, foreground image, background update;
//   NUM_LK_CU Lucas-Kanade optical-flow units (lk_core): flow per pixel,
//     speed per road region, debug colour image.
// The default counts, 3 and 6, are the unit counts of the source design's
// full configuration. Every unit has its own pixel stream and result ports:
// the host and the DRAM transfers decide which camera, frame or image strip
// each unit works on. The run-time thresholds are shared by all units of a
// kind. Unit i's ports are element i of each array port.
// Timing: see bgs_core and lk_core; every unit takes one pixel per clock.
module smart_city_top import sc_pkg::*; #(
  parameter int unsigned WIDTH       = 1280,
  parameter int unsigned HEIGHT      = 720,
  parameter int unsigned NUM_BGS_CU  = 3,
  parameter int unsigned NUM_LK_CU   = 6,
  parameter int unsigned NUM_REGIONS = 2,
  parameter int unsigned WIN         = 15,
  parameter int unsigned BGS_OFFSET  = 10,
  parameter int unsigned BGS_ACC_W   = 40,
  parameter int unsigned LK_ACC_W    = 56,
  parameter int unsigned CNT_W       = 24
) (
  input  logic clk,
  input  logic rst_n,

  // background subtraction settings
  input  lat_t   bgs_lat_threshold,
  input  pix_t   bgs_bg_threshold,
  input  count_t bgs_n_frames,
  // background subtraction units
  input  logic     [NUM_BGS_CU-1:0] bgs_in_valid,
  output logic     [NUM_BGS_CU-1:0] bgs_in_ready,
  input  bgs_in_t  [NUM_BGS_CU-1:0] bgs_in_pix,
  output logic     [NUM_BGS_CU-1:0] bgs_out_valid,
  output bgs_out_t [NUM_BGS_CU-1:0] bgs_out_pix,
  output logic     [NUM_BGS_CU-1:0] bgs_frame_done,
  output logic signed [NUM_BGS_CU-1:0][NUM_REGIONS-1:0][BGS_ACC_W-1:0] bgs_area_sum,
  output logic [NUM_BGS_CU-1:0][NUM_REGIONS-1:0][CNT_W-1:0]            bgs_moving_count,

  // optical flow settings
  input  vel_t   lk_v_min,
  // optical flow units
  input  logic    [NUM_LK_CU-1:0] lk_in_valid,
  output logic    [NUM_LK_CU-1:0] lk_in_ready,
  input  lk_in_t  [NUM_LK_CU-1:0] lk_in_pix,
  output logic    [NUM_LK_CU-1:0] lk_out_valid,
  output lk_out_t [NUM_LK_CU-1:0] lk_out_pix,
  output logic    [NUM_LK_CU-1:0] lk_frame_done,
  output logic signed [NUM_LK_CU-1:0][NUM_REGIONS-1:0][LK_ACC_W-1:0] lk_speed_sum,
  output logic [NUM_LK_CU-1:0][NUM_REGIONS-1:0][CNT_W-1:0]           lk_moving_count
);

  for (genvar i = 0; i < NUM_BGS_CU; i++) begin : g_bgs
    bgs_core #(
      .WIDTH       (WIDTH),
      .HEIGHT      (HEIGHT),
      .OFFSET      (BGS_OFFSET),
      .NUM_REGIONS (NUM_REGIONS),
      .ACC_W       (BGS_ACC_W),
      .CNT_W       (CNT_W)
    ) u_bgs (
      .clk           (clk),
      .rst_n         (rst_n),
      .lat_threshold (bgs_lat_threshold),
      .bg_threshold  (bgs_bg_threshold),
      .n_frames      (bgs_n_frames),
      .in_valid      (bgs_in_valid[i]),
      .in_ready      (bgs_in_ready[i]),
      .in_pix        (bgs_in_pix[i]),
      .out_valid     (bgs_out_valid[i]),
      .out_pix       (bgs_out_pix[i]),
      .frame_done    (bgs_frame_done[i]),
      .area_sum      (bgs_area_sum[i]),
      .moving_count  (bgs_moving_count[i])
    );
  end

  for (genvar i = 0; i < NUM_LK_CU; i++) begin : g_lk
    lk_core #(
      .WIDTH       (WIDTH),
      .HEIGHT      (HEIGHT),
      .WIN         (WIN),
      .NUM_REGIONS (NUM_REGIONS),
      .ACC_W       (LK_ACC_W),
      .CNT_W       (CNT_W)
    ) u_lk (
      .clk          (clk),
      .rst_n        (rst_n),
      .v_min        (lk_v_min),
      .in_valid     (lk_in_valid[i]),
      .in_ready     (lk_in_ready[i]),
      .in_pix       (lk_in_pix[i]),
      .out_valid    (lk_out_valid[i]),
      .out_pix      (lk_out_pix[i]),
      .frame_done   (lk_frame_done[i]),
      .speed_sum    (lk_speed_sum[i]),
      .moving_count (lk_moving_count[i])
    );
  end

endmodule
