// lk_gradient: derivatives of one pixel for Lucas-Kanade optical flow.
//
// From the 4-neighbourhood of a pixel in frame 0 and the same pixel in
// frame 1 it forms the central differences and the temporal difference
//   gx = right - left   (= 2*Ix),  gy = down - up  (= 2*Iy),  gt = im1 - center.
// The source algorithm defines Ix = (right-left)/2 and Iy = (down-up)/2; the
// halving is left out here so no bit is lost, and the flow solver undoes the
// factor of two. At the image border the missing neighbour is replaced by
// the pixel itself (clamp to edge), which is this implementation's choice.
// Purely combinational.
module lk_gradient import sc_pkg::*; (
  input  pix_t     center,
  input  pix_t     left,
  input  pix_t     right,
  input  pix_t     up,
  input  pix_t     down,
  input  pix_t     im1,
  input  logic     at_left,
  input  logic     at_right,
  input  logic     at_top,
  input  logic     at_bottom,
  output lk_grad_t grad
);

  pix_t l, r, u, d;

  always_comb begin
    l = at_left   ? center : left;
    r = at_right  ? center : right;
    u = at_top    ? center : up;
    d = at_bottom ? center : down;
    grad.gx = grad_t'({1'b0, r}) - grad_t'({1'b0, l});
    grad.gy = grad_t'({1'b0, d}) - grad_t'({1'b0, u});
    grad.gt = grad_t'({1'b0, im1}) - grad_t'({1'b0, center});
  end

endmodule
