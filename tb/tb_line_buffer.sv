// tb_line_buffer: writes an image row by row (with idle cycles in between)
// into a 3-row buffer and checks that each read returns the same column of
// the previous three rows, one clock after the access.
module tb_line_buffer;
  localparam int W = 10, ROWS = 3, DW = 8, NROW = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en;
  logic [3:0] addr;
  logic [DW-1:0] din;
  logic [ROWS-1:0][DW-1:0] dout;

  line_buffer #(.WIDTH(W), .ROWS(ROWS), .DW(DW)) dut (.clk, .en, .addr, .din, .dout);

  int checks = 0, failures = 0;
  logic [DW-1:0] img [NROW][W];

  initial begin
    for (int y = 0; y < NROW; y++) for (int x = 0; x < W; x++) img[y][x] = DW'($urandom);
    en = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int y = 0; y < NROW; y++) begin
      for (int x = 0; x < W; x++) begin
        en = 1; addr = 4'(x); din = img[y][x];
        @(negedge clk);
        en = 0;
        if (y >= ROWS) begin
          for (int r = 0; r < ROWS; r++) begin
            checks++;
            if (dout[r] != img[y-1-r][x]) begin
              failures++;
              $display("FAIL row %0d col %0d tap %0d: %h expected %h", y, x, r, dout[r], img[y-1-r][x]);
            end
          end
        end
        if ($urandom_range(0, 2) == 0) begin
          // an idle cycle must not change the buffer or the output
          logic [ROWS-1:0][DW-1:0] held;
          held = dout;
          addr = 4'($urandom_range(0, W-1)); din = DW'($urandom);
          @(negedge clk);
          checks++;
          if (dout != held) begin failures++; $display("FAIL output changed while idle"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
