// fifo_ptr: pointer block of the output FIFO.
//
// Holds the write pointer (next location to fill) and the read pointer (next
// location to empty). Each advances by one, wrapping at DEPTH, on a clock edge
// where its enable is high. The enables arrive already qualified by the count
// block (no write when full, no read when empty), so this block does no
// checking of its own. Splitting the FIFO into pointer, count and read/write
// blocks follows the published FIFO structure; the widths are derived here.
//
// Interface: synchronous active-low reset rst_n clears both pointers to 0.
// wr_en and rd_en are sampled on the rising edge of clk; wptr and rptr are
// registered outputs.
module fifo_ptr #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          rd_en,
  output logic [AW-1:0] wptr,
  output logic [AW-1:0] rptr
);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en) wptr <= next_ptr(wptr);
      if (rd_en) rptr <= next_ptr(rptr);
    end
  end

endmodule
