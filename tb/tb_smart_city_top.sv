// tb_smart_city_top: end-to-end test of the accelerator with all compute
// units working at once on a reduced 32x24 frame: 3 background-subtraction
// units and 6 optical-flow units, each fed its own stream (random traffic
// frames, textured frame pairs with motion towards and away from the camera)
// with its own pattern of input gaps, for two frames each. Every output
// pixel and every per-region total is checked against the reference models.
// It counts each mechanism of the design and fails if one never happened:
// moving pixels, background updates, saturated counters, input held off while
// a unit finishes a frame, flow forced to zero in flat windows, flow towards
// and away from the camera, and the per-frame result pulse of every unit.
module tb_smart_city_top;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int W = 32, H = 24, NPIX = W*H;
  localparam int NB = 3, NL = 6, NR = 2, NFR = 2;
  localparam int LAT_TH = 40, BG_TH = 20, NF = 5, VMIN = 64;
  localparam longint DET_MIN = 65536;
  localparam int WATCHDOG = 40 * NPIX + 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     [NB-1:0] bgs_in_valid, bgs_in_ready, bgs_out_valid, bgs_frame_done;
  bgs_in_t  [NB-1:0] bgs_in_pix;
  bgs_out_t [NB-1:0] bgs_out_pix;
  logic signed [NB-1:0][NR-1:0][39:0] bgs_area_sum;
  logic [NB-1:0][NR-1:0][23:0] bgs_moving_count;
  logic     [NL-1:0] lk_in_valid, lk_in_ready, lk_out_valid, lk_frame_done;
  lk_in_t   [NL-1:0] lk_in_pix;
  lk_out_t  [NL-1:0] lk_out_pix;
  logic signed [NL-1:0][NR-1:0][55:0] lk_speed_sum;
  logic [NL-1:0][NR-1:0][23:0] lk_moving_count;

  smart_city_top #(.WIDTH(W), .HEIGHT(H), .NUM_BGS_CU(NB), .NUM_LK_CU(NL), .NUM_REGIONS(NR)) dut (
    .clk, .rst_n,
    .bgs_lat_threshold (LAT_W'(LAT_TH)), .bgs_bg_threshold (8'(BG_TH)), .bgs_n_frames (8'(NF)),
    .bgs_in_valid, .bgs_in_ready, .bgs_in_pix, .bgs_out_valid, .bgs_out_pix,
    .bgs_frame_done, .bgs_area_sum, .bgs_moving_count,
    .lk_v_min (vel_t'(VMIN)),
    .lk_in_valid, .lk_in_ready, .lk_in_pix, .lk_out_valid, .lk_out_pix,
    .lk_frame_done, .lk_speed_sum, .lk_moving_count);

`include "sc_top_checks.svh"

endmodule
