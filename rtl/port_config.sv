// port_config: memory interface that holds the address of each output port.
//
// The switch routes a packet to the output port whose configured address
// equals the packet's destination address (DA). This block keeps one
// DATA_W-bit address per port in a small register file that a host reads and
// writes through the memory interface of the published design: mem_en enables
// an access, mem_rd_wr selects write (1) or read (0), mem_add picks the port
// (0..3) and mem_data carries the address to write. The published interface
// has one mem_data bus; here it is split into a write input (mem_data) and a
// read output (mem_rdata), since the switch has no tri-state buses.
//
// Timing: a write takes effect on the rising edge with mem_en and mem_rd_wr
// high, and the new address is used for the next packet header. A read
// returns the addressed register on mem_rdata after the edge with mem_en high
// and mem_rd_wr low; mem_rdata holds between reads. Reset (synchronous,
// active low) clears every port address to 0.
module port_config
  import switch_pkg::*;
#(
  parameter int unsigned PORTS = NUM_PORTS,
  parameter int unsigned AW    = PORT_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mem_en,
  input  logic          mem_rd_wr,
  input  logic [AW-1:0] mem_add,
  input  byte_t         mem_data,
  output byte_t         mem_rdata,
  output byte_t         port_addr [PORTS]
);

  byte_t addr_q [PORTS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < PORTS; i++) addr_q[i] <= '0;
      mem_rdata <= '0;
    end else if (mem_en) begin
      if (mem_rd_wr) addr_q[mem_add] <= mem_data;
      else           mem_rdata       <= addr_q[mem_add];
    end
  end

  assign port_addr = addr_q;

endmodule
