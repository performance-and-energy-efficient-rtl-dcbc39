// pipe_divider: pipelined unsigned fixed-point divider with saturation.
//
// Computes q = min(floor(num * 2^FRAC / den), 2^QW - 1) for den > 0, one
// division per clock, with QW+1 cycles of latency. A restoring divider is
// unrolled into QW register stages, one quotient bit per stage, MSB first;
// the input stage checks for overflow, so the stages only need QW bits.
// A sideband word travels with each division. No back-pressure: in_valid
// may be high every cycle. Helper of the flow solver.
module pipe_divider #(
  parameter int unsigned NW   = 64,
  parameter int unsigned QW   = 15,
  parameter int unsigned FRAC = 8,
  parameter int unsigned SBW  = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [NW-1:0]  num,
  input  logic [NW-1:0]  den,
  input  logic [SBW-1:0] in_sb,
  output logic           out_valid,
  output logic [QW-1:0]  quo,
  output logic [SBW-1:0] out_sb
);

  localparam int unsigned RW = NW + FRAC + QW + 1;

  logic [QW:0]          v;
  logic [QW:0]          sat;
  logic [RW-1:0]        rem [QW+1];
  logic [RW-1:0]        dv  [QW+1];
  logic [QW-1:0]        q   [QW+1];
  logic [SBW-1:0]       sb  [QW+1];

  // stage 0: scale and check for overflow
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0]   <= 1'b0;
      sat[0] <= 1'b0;
      rem[0] <= '0;
      dv[0]  <= '0;
      q[0]   <= '0;
      sb[0]  <= '0;
    end else begin
      v[0]   <= in_valid;
      rem[0] <= RW'(num) << FRAC;
      dv[0]  <= RW'(den);
      sat[0] <= ((RW'(num) << FRAC) >= (RW'(den) << QW));
      q[0]   <= '0;
      sb[0]  <= in_sb;
    end
  end

  // stages 1..QW: quotient bit QW-s
  for (genvar s = 1; s <= QW; s++) begin : g_stage
    localparam int unsigned B = QW - s;
    logic [RW-1:0] trial;
    assign trial = dv[s-1] << B;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[s]   <= 1'b0;
        sat[s] <= 1'b0;
        rem[s] <= '0;
        dv[s]  <= '0;
        q[s]   <= '0;
        sb[s]  <= '0;
      end else begin
        v[s]   <= v[s-1];
        sat[s] <= sat[s-1];
        dv[s]  <= dv[s-1];
        sb[s]  <= sb[s-1];
        if (rem[s-1] >= trial) begin
          rem[s]  <= rem[s-1] - trial;
          q[s]    <= q[s-1] | (QW'(1) << B);
        end else begin
          rem[s]  <= rem[s-1];
          q[s]    <= q[s-1];
        end
      end
    end
  end

  assign out_valid = v[QW];
  assign quo       = sat[QW] ? {QW{1'b1}} : q[QW];
  assign out_sb    = sb[QW];

endmodule
