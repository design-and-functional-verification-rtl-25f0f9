// fifo_mem: storage with the write block and read block of the output FIFO.
//
// A DEPTH x WIDTH register array. The write block stores din at the location
// named by the write pointer on a rising edge with wr_en high. The read block
// copies the location named by the read pointer into the output register dout
// on a rising edge with rd_en high; dout holds its value otherwise. The read
// is registered, so data requested on one edge is on dout after that edge,
// matching the published description of a byte written to a location being
// read from it in the next clock cycle. Reset clears the array and dout, so
// no data from before the reset can reach an output port.
//
// Interface: wr_en and rd_en must already be qualified (no write when full,
// no read when empty). Synchronous active-low reset.
module fifo_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [AW-1:0]    wptr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  input  logic [AW-1:0]    rptr,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  // Write block.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[wptr] <= din;
    end
  end

  // Read block.
  always_ff @(posedge clk) begin
    if (!rst_n)     dout <= '0;
    else if (rd_en) dout <= mem[rptr];
  end

endmodule
