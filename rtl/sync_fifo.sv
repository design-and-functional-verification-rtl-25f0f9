// sync_fifo: 16x8 synchronous FIFO that buffers one output port of the switch.
//
// The FIFO is built from three sub-blocks, as in the published design: a
// count block (fifo_count) that tracks occupancy, raises full and empty and
// lets a write through only when not full and a read only when not empty; a
// pointer block (fifo_ptr) that advances the write and read pointers; and the
// storage with its write and read blocks (fifo_mem).
//
// Interface: wr_en/din push a byte on the rising edge (ignored when full).
// rd_en pops a byte (ignored when empty); the popped byte appears on dout
// after that same edge and stays there until the next pop. full, empty and
// count describe the contents after the last edge. Simultaneous push and pop
// are allowed. Synchronous active-low reset empties the FIFO and clears dout.
module sync_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic          wr_ok, rd_ok;
  logic [AW-1:0] wptr, rptr;

  fifo_count #(.DEPTH(DEPTH)) u_count (
    .clk, .rst_n,
    .wr_req(wr_en), .rd_req(rd_en),
    .wr_ok, .rd_ok,
    .count, .full, .empty
  );

  fifo_ptr #(.DEPTH(DEPTH)) u_ptr (
    .clk, .rst_n,
    .wr_en(wr_ok), .rd_en(rd_ok),
    .wptr, .rptr
  );

  fifo_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .clk, .rst_n,
    .wr_en(wr_ok), .wptr, .din,
    .rd_en(rd_ok), .rptr, .dout
  );

  // The pointers and the count must agree: for a power-of-two depth the
  // distance from read to write pointer is the count modulo DEPTH.
  if (DEPTH == (1 << AW)) begin : g_ptr_check
    always_ff @(posedge clk) begin
      if (rst_n) begin
        assert (AW'(wptr - rptr) == AW'(count))
          else $error("sync_fifo: pointers and count disagree");
      end
    end
  end

endmodule
