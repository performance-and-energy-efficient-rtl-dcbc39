// tb_lk_gradient: random neighbourhoods and border flags; checks the doubled
// central differences and the temporal difference against integer arithmetic.
module tb_lk_gradient;
  import sc_pkg::*;
  pix_t center, left, right, up, down, im1;
  logic at_left, at_right, at_top, at_bottom;
  lk_grad_t grad;

  lk_gradient dut (.center, .left, .right, .up, .down, .im1,
                   .at_left, .at_right, .at_top, .at_bottom, .grad);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int l, r, u, d, ex, ey, et;
      center = pix_t'($urandom); left = pix_t'($urandom); right = pix_t'($urandom);
      up = pix_t'($urandom); down = pix_t'($urandom); im1 = pix_t'($urandom);
      if (i < 4) begin center = 0; left = 255; right = 0; up = 0; down = 255; im1 = 255; end
      {at_left, at_right, at_top, at_bottom} = (i % 3 == 0) ? 4'($urandom) : 4'b0;
      #1;
      l = at_left ? center : left;  r = at_right ? center : right;
      u = at_top ? center : up;     d = at_bottom ? center : down;
      ex = r - l; ey = d - u; et = int'(im1) - int'(center);
      checks++;
      if (int'(grad.gx) != ex || int'(grad.gy) != ey || int'(grad.gt) != et) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: got %0d %0d %0d expected %0d %0d %0d", i,
                                    grad.gx, grad.gy, grad.gt, ex, ey, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
