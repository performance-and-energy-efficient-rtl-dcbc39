// lk_solver: solves the 2x2 Lucas-Kanade system for one pixel.
//
// With G = [sxx sxy; sxy syy] and b = [sxt; syt] built from the doubled
// spatial derivatives (gx = 2*Ix, gy = 2*Iy) the flow is
//   v = -G_true^-1 * b_true = -2 * [syy*sxt - sxy*syt ; sxx*syt - sxy*sxt] / det
//   det = sxx*syy - sxy^2
// (the factor 2 undoes the doubled derivatives). The source design inverts G
// and multiplies by b; the closed-form inverse, the fixed-point output format
// and the det_min rule are this implementation's choices: where
// det <= DET_MIN the window has too little texture and the flow is set to 0.
//
// Pipeline: products (1 cycle), determinant and numerators (1 cycle), then
// two pipe_divider instances (VEL_W cycles). Results are signed Q(VEL_W-1-VFRAC).VFRAC
// pixels per frame, saturated to +-(2^(VEL_W-1)-1) LSB. x to the right and y
// downwards are positive. A sideband word travels with every pixel.
// No back-pressure; latency 2 + VEL_W = 18 cycles, one pixel per clock.
module lk_solver import sc_pkg::*; #(
  parameter int unsigned  SBW     = 1,
  parameter longint       DET_MIN = 64'd65536
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  lk_sums_t       sums,
  input  logic [SBW-1:0] in_sb,
  output logic           out_valid,
  output vel_t           vx,
  output vel_t           vy,
  output logic [SBW-1:0] out_sb
);

  localparam int unsigned NW = 64;
  localparam int unsigned QW = VEL_W - 1;
  typedef logic signed [NW-1:0] wide_t;

  // stage 1: products
  logic           s1_v;
  logic [SBW-1:0] s1_sb;
  wide_t          p_xxyy, p_xyxy, p_yyxt, p_xyyt, p_xxyt, p_xyxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      s1_sb  <= '0;
      p_xxyy <= '0;
      p_xyxy <= '0;
      p_yyxt <= '0;
      p_xyyt <= '0;
      p_xxyt <= '0;
      p_xyxt <= '0;
    end else begin
      s1_v   <= in_valid;
      s1_sb  <= in_sb;
      p_xxyy <= wide_t'(sums.sxx) * wide_t'(sums.syy);
      p_xyxy <= wide_t'(sums.sxy) * wide_t'(sums.sxy);
      p_yyxt <= wide_t'(sums.syy) * wide_t'(sums.sxt);
      p_xyyt <= wide_t'(sums.sxy) * wide_t'(sums.syt);
      p_xxyt <= wide_t'(sums.sxx) * wide_t'(sums.syt);
      p_xyxt <= wide_t'(sums.sxy) * wide_t'(sums.sxt);
    end
  end

  // stage 2: determinant and numerators (sign and magnitude)
  wide_t det, nx, ny;
  assign det = p_xxyy - p_xyxy;
  assign nx  = -((p_yyxt - p_xyyt) <<< 1);
  assign ny  = -((p_xxyt - p_xyxt) <<< 1);

  logic           s2_v, s2_ok, s2_nx_neg, s2_ny_neg;
  logic [NW-1:0]  s2_det, s2_nx, s2_ny;
  logic [SBW-1:0] s2_sb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v      <= 1'b0;
      s2_ok     <= 1'b0;
      s2_nx_neg <= 1'b0;
      s2_ny_neg <= 1'b0;
      s2_det    <= '0;
      s2_nx     <= '0;
      s2_ny     <= '0;
      s2_sb     <= '0;
    end else begin
      s2_v      <= s1_v;
      s2_ok     <= (det > wide_t'(DET_MIN));
      s2_nx_neg <= nx[NW-1];
      s2_ny_neg <= ny[NW-1];
      s2_det    <= det;
      s2_nx     <= nx[NW-1] ? -nx : nx;
      s2_ny     <= ny[NW-1] ? -ny : ny;
      s2_sb     <= s1_sb;
    end
  end

  // stages 3..: the two divisions
  logic [QW-1:0]    qx, qy;
  logic [SBW+2:0]   d_sb;
  logic             dx_v, dy_v;
  logic [0:0]       unused_sb;

  pipe_divider #(.NW(NW), .QW(QW), .FRAC(VFRAC), .SBW(SBW + 3)) u_div_x (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s2_v),
    .num       (s2_nx),
    .den       (s2_det),
    .in_sb     ({s2_sb, s2_ok, s2_nx_neg, s2_ny_neg}),
    .out_valid (dx_v),
    .quo       (qx),
    .out_sb    (d_sb)
  );

  pipe_divider #(.NW(NW), .QW(QW), .FRAC(VFRAC), .SBW(1)) u_div_y (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s2_v),
    .num       (s2_ny),
    .den       (s2_det),
    .in_sb     (1'b0),
    .out_valid (dy_v),
    .quo       (qy),
    .out_sb    (unused_sb)
  );

  logic ok, xneg, yneg;
  assign ok   = d_sb[2];
  assign xneg = d_sb[1];
  assign yneg = d_sb[0];

  assign out_valid = dx_v && dy_v;
  assign out_sb    = d_sb[SBW+2:3];
  assign vx = !ok ? '0 : xneg ? -vel_t'({1'b0, qx}) : vel_t'({1'b0, qx});
  assign vy = !ok ? '0 : yneg ? -vel_t'({1'b0, qy}) : vel_t'({1'b0, qy});

endmodule
