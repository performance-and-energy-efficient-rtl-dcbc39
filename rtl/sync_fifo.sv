// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of DW bits in a RAM array with read and write pointers.
// push writes din at the tail, pop removes the head; dout shows the head
// combinationally while the FIFO is not empty. Pushing into a full FIFO or
// popping an empty one is a usage error, flagged by the assertions.
// Helper of the optical-flow unit, which uses it to keep the road
// description of each pixel until that pixel's flow is ready.
module sync_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic          pop,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic          full
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   used;

  assign empty = (used == '0);
  assign full  = (used == (AW+1)'(DEPTH));
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp   <= '0;
      rp   <= '0;
      used <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      used <= used + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
