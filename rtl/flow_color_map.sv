// flow_color_map: debug colour of one flow vector, linear mapping.
//
// Stationary pixels are white. Each direction of motion removes colour in
// proportion to its speed, so that motion towards the camera (down the
// image, vy > 0) tends to green, away from it (vy < 0) to blue, to the right
// (vx > 0) to red and to the left (vx < 0) to cyan:
//   t = |vy| if vy > 0, a = |vy| if vy < 0, r = |vx| if vx > 0, l = |vx| if vx < 0
//   each scaled as |v| >> SHIFT and limited to 255,
//   R = 255 - min(255, t + a + l), G = 255 - min(255, a + r),
//   B = 255 - min(255, t + r).
// The source design replaced the trigonometric colour wheel by a linear
// pixel mapping to keep the pipeline at one pixel per clock; the colours
// per direction follow its colour legend, the formula and SHIFT are this
// implementation's choices. Purely combinational.
module flow_color_map import sc_pkg::*; #(
  parameter int unsigned SHIFT = 2
) (
  input  vel_t        vx,
  input  vel_t        vy,
  output logic [23:0] rgb
);

  function automatic logic [9:0] mag(input vel_t v, input logic want_pos);
    logic [VEL_W-1:0] m;
    logic [VEL_W-1:0] s;
    if (want_pos ? (v <= 0) : (v >= 0)) return '0;
    m = v[VEL_W-1] ? VEL_W'(-v) : VEL_W'(v);
    s = m >> SHIFT;
    return (s > 255) ? 10'd255 : 10'(s);
  endfunction

  function automatic logic [7:0] sub255(input logic [9:0] x);
    return (x >= 10'd255) ? 8'd0 : 8'(10'd255 - x);
  endfunction

  logic [9:0] t, a, r, l;

  always_comb begin
    t = mag(vy, 1'b1);
    a = mag(vy, 1'b0);
    r = mag(vx, 1'b1);
    l = mag(vx, 1'b0);
    rgb = {sub255(t + a + l), sub255(a + r), sub255(t + r)};
  end

endmodule
