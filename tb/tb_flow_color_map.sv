// tb_flow_color_map: hand-worked colours for still, towards, away, left,
// right and saturated motion, then white-when-still and channel-order
// properties on random vectors.
module tb_flow_color_map;
  import sc_pkg::*;
  vel_t vx, vy;
  logic [23:0] rgb;

  flow_color_map #(.SHIFT(2)) dut (.vx, .vy, .rgb);

  int checks = 0, failures = 0;

  task automatic expect_rgb(input int x, input int y, input logic [23:0] e);
    vx = vel_t'(x); vy = vel_t'(y);
    #1;
    checks++;
    if (rgb !== e) begin
      failures++;
      $display("FAIL v=(%0d,%0d): %h expected %h", x, y, rgb, e);
    end
  endtask

  initial begin
    expect_rgb(0, 0, 24'hffffff);            // still: white
    expect_rgb(0, 256, 24'hbfffbf);          // 1 px/frame towards: R,B -64 (green)
    expect_rgb(0, -256, 24'hbfbfff);         // away: R,G -64 (blue)
    expect_rgb(256, 0, 24'hffbfbf);          // right: G,B -64 (red)
    expect_rgb(-256, 0, 24'hbfffff);         // left: R -64 (cyan)
    expect_rgb(0, 2048, 24'h00ff00);         // fast towards: pure green
    expect_rgb(0, -32767, 24'h0000ff);       // fast away: pure blue
    expect_rgb(400, 400, 24'h9b9b37);        // right+towards: t=r=100, yellow
    expect_rgb(-3, 3, 24'hffffff);           // below one step: still white
    for (int i = 0; i < 500; i++) begin
      vx = vel_t'($urandom); vy = vel_t'($urandom);
      #1;
      checks++;
      // green is only reduced by motion away or to the right
      if ((vy >= 0 && vx <= 0) && rgb[15:8] != 8'hff) begin failures++; $display("FAIL G channel"); end
      checks++;
      // red is never reduced by motion to the right alone
      if ((vy == 0 && vx >= 0) && rgb[23:16] != 8'hff) begin failures++; $display("FAIL R channel"); end
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
