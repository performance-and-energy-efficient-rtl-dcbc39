// lk_window_sum: WIN x WIN window sums of the Lucas-Kanade normal equations.
//
// For every pixel the flow solver needs, over the WIN x WIN window around it,
//   sxx = sum gx*gx, sxy = sum gx*gy, syy = sum gy*gy,
//   sxt = sum gx*gt, syt = sum gy*gt.
// Instead of visiting all WIN*WIN window pixels per output, the sum is split
// in two passes that re-use each derivative:
//   1. vertical pass: the derivatives of the last WIN-1 rows stay in an
//      on-chip line buffer ("line buffer 2", one word per image column), so
//      for each new column the WIN products of that column are summed once;
//   2. horizontal pass: the last WIN column sums sit in a shift register and
//      are added up, giving the window sum (WIN + WIN additions instead of
//      WIN * WIN per pixel).
// Derivatives outside the image (rows above row 0, rows below HEIGHT-1,
// columns outside 0..WIDTH-1) count as zero. This two-pass split and the
// line buffer of derivatives follow the source design; the zero border and
// the fully parallel column adder are this implementation's choices.
//
// Interface: en advances the whole unit by one raster position. At each
// enabled cycle the caller presents the derivatives g of position (x, y),
// with g = 0 whenever (x, y) is outside the image; x runs from -1 up to
// WIDTH+HALF-1 per row and y from -1 up to HEIGHT+HALF, HALF = WIN/2.
// Four enabled cycles later the sums for the window centred on
// (x-HALF, y-HALF) of that position appear on sums, with out_x/out_y, and
// out_valid pulses for one cycle if that centre lies inside the image.
module lk_window_sum import sc_pkg::*; #(
  parameter int unsigned WIDTH  = 1280,
  parameter int unsigned HEIGHT = 720,
  parameter int unsigned WIN    = 15,
  localparam int unsigned HALF  = WIN / 2,
  localparam int unsigned CW    = $clog2(WIDTH + 2 * WIN) + 1,
  localparam int unsigned RW    = $clog2(HEIGHT + 2 * WIN) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] x,
  input  logic signed [RW-1:0] y,
  input  lk_grad_t             g,
  output logic                 out_valid,
  output logic signed [CW-1:0] out_x,
  output logic signed [RW-1:0] out_y,
  output lk_sums_t             sums
);

  localparam int unsigned AW = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned GW = $bits(lk_grad_t);

  // ---- line buffer 2: derivatives of the previous WIN-1 rows -------------
  logic                           x_in;
  logic [WIN-2:0][GW-1:0]         lb_q;

  assign x_in = (x >= 0) && (x < CW'(WIDTH));

  line_buffer #(.WIDTH(WIDTH), .ROWS(WIN-1), .DW(GW)) u_lb2 (
    .clk  (clk),
    .en   (en && x_in),
    .addr (AW'(x)),
    .din  (g),
    .dout (lb_q)
  );

  // stage A: the current derivative next to the column read from the buffer
  lk_grad_t               a_g;
  logic signed [CW-1:0]   a_x;
  logic signed [RW-1:0]   a_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_g <= '0;
      a_x <= '0;
      a_y <= '0;
    end else if (en) begin
      a_g <= g;
      a_x <= x;
      a_y <= y;
    end
  end

  // vertical pass: products of one column, summed over WIN rows
  lk_sums_t col;
  lk_grad_t rowg;
  logic     a_col_in;

  assign a_col_in = (a_x >= 0) && (a_x < CW'(WIDTH));

  always_comb begin
    col = '0;
    for (int k = 0; k < WIN; k++) begin
      if (k == 0) rowg = a_g;
      else        rowg = lk_grad_t'(lb_q[k-1]);
      // rows above the top of the image, or a column outside it, add nothing
      if (a_col_in && (int'(a_y) - k >= 0)) begin
        col.sxx = col.sxx + sum_t'(rowg.gx) * sum_t'(rowg.gx);
        col.sxy = col.sxy + sum_t'(rowg.gx) * sum_t'(rowg.gy);
        col.syy = col.syy + sum_t'(rowg.gy) * sum_t'(rowg.gy);
        col.sxt = col.sxt + sum_t'(rowg.gx) * sum_t'(rowg.gt);
        col.syt = col.syt + sum_t'(rowg.gy) * sum_t'(rowg.gt);
      end
    end
  end

  // stage B: column sums; stage C: the last WIN column sums
  lk_sums_t             b_col;
  logic signed [CW-1:0] b_x;
  logic signed [RW-1:0] b_y;
  lk_sums_t             hs [WIN];
  logic signed [CW-1:0] c_x;
  logic signed [RW-1:0] c_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_col <= '0;
      b_x   <= '0;
      b_y   <= '0;
      for (int i = 0; i < WIN; i++) hs[i] <= '0;
      c_x   <= '0;
      c_y   <= '0;
    end else if (en) begin
      b_col <= col;
      b_x   <= a_x;
      b_y   <= a_y;
      hs[0] <= b_col;
      for (int i = 1; i < WIN; i++) hs[i] <= hs[i-1];
      c_x   <= b_x;
      c_y   <= b_y;
    end
  end

  // horizontal pass
  lk_sums_t win;
  always_comb begin
    win = '0;
    for (int i = 0; i < WIN; i++) begin
      win.sxx = win.sxx + hs[i].sxx;
      win.sxy = win.sxy + hs[i].sxy;
      win.syy = win.syy + hs[i].syy;
      win.sxt = win.sxt + hs[i].sxt;
      win.syt = win.syt + hs[i].syt;
    end
  end

  logic signed [CW-1:0] cx;
  logic signed [RW-1:0] cy;
  assign cx = c_x - CW'(HALF);
  assign cy = c_y - RW'(HALF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      sums      <= '0;
    end else begin
      out_valid <= en && (cx >= 0) && (cx < CW'(WIDTH)) && (cy >= 0) && (cy < RW'(HEIGHT));
      if (en) begin
        out_x <= cx;
        out_y <= cy;
        sums  <= win;
      end
    end
  end

endmodule
