// fifo_count: count block of the output FIFO.
//
// Tracks how many entries the FIFO holds and derives the full and empty flags
// from that count. It also qualifies the requests: a write request is passed
// on as wr_ok only when the FIFO is not full, a read request as rd_ok only
// when it is not empty, as the published design requires. A write and a read
// on the same edge leave the count unchanged.
//
// Interface: wr_req and rd_req are the raw requests; wr_ok and rd_ok are the
// combinational qualified enables for the pointer and memory blocks. count,
// full and empty are registered state (full and empty decode the count).
// Synchronous active-low reset empties the FIFO.
module fifo_count #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_req,
  input  logic          rd_req,
  output logic          wr_ok,
  output logic          rd_ok,
  output logic [CW-1:0] count,
  output logic          full,
  output logic          empty
);

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign wr_ok = wr_req && !full;
  assign rd_ok = rd_req && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
    end else begin
      unique case ({wr_ok, rd_ok})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
