// switch_top: 1x4 packet switch.
//
// One byte-wide input port receives packets of the form DA, SA, LEN, LEN
// payload bytes, FCS (4 to 259 bytes). Each output port 0..3 has an address
// set through the memory interface; a packet whose DA equals a port's address
// is copied whole into that port's 16x8 FIFO, from which a receiver drains it
// at its own pace. The controller checks the FCS (even parity: the XOR of all
// bytes is zero) as the packet passes.
//
// Structure (as in the published architecture): clock and reset conditioning
// (reset_sync), the memory interface with the port addresses (port_config),
// the packet controller FSM (switch_fsm) and four synchronous FIFOs
// (sync_fifo), one per output port.
//
// Ports and timing:
//   rst_n                 active-low reset; released in step with clk after
//                         two rising edges, then everything starts empty and
//                         every port address is 0.
//   data_status, data_in  input port; a byte is taken on a rising edge with
//                         data_status high and busy low.
//   busy                  the switch cannot take a byte this cycle (the
//                         destination FIFO is full, or still holds an earlier
//                         packet when a new one for it starts). This stall
//                         output is this design's addition.
//   mem_en, mem_rd_wr,    memory interface: write (mem_rd_wr=1) or read
//   mem_add, mem_data,    (mem_rd_wr=0) the address of port mem_add; read
//   mem_rdata             data appears on mem_rdata after the edge.
//   ready_N               port N's FIFO holds data.
//   read_N                pop a byte from port N; the byte is on port_N after
//                         that rising edge and stays until the next pop.
//   parity_err, pkt_drop  one-cycle pulses: a packet ended with a bad FCS (it
//                         is still forwarded), or a packet's DA matched no
//                         port (it is discarded). Both are additions.
// A packet's first byte can reach its FIFO on the edge it is taken, so
// ready_N rises one cycle after the DA byte is taken and the DA byte can be
// read out one cycle after that. The FIFO fill levels (fifo_count) and the
// controller state (fsm_state) are not brought out; they are kept as named
// signals for observation in simulation, so lint reports them as unused.
// The four ports' FIFOs share one write data bus; the controller writes at
// most one of them per cycle.
module switch_top
  import switch_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH_P = FIFO_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  // input port
  input  logic  data_status,
  input  byte_t data_in,
  output logic  busy,
  // memory interface
  input  logic               mem_en,
  input  logic               mem_rd_wr,
  input  logic [PORT_AW-1:0] mem_add,
  input  byte_t              mem_data,
  output byte_t              mem_rdata,
  // output ports
  input  logic  read_0, read_1, read_2, read_3,
  output logic  ready_0, ready_1, ready_2, ready_3,
  output byte_t port_0, port_1, port_2, port_3,
  // status
  output logic  parity_err,
  output logic  pkt_drop
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH_P + 1);

  logic                 rst_n_s;
  byte_t                port_addr [NUM_PORTS];
  logic [NUM_PORTS-1:0] fifo_full, fifo_empty, fifo_wr, fifo_rd;
  byte_t                fifo_din;
  byte_t                fifo_dout [NUM_PORTS];
  logic [CW-1:0]        fifo_count [NUM_PORTS];
  state_t               fsm_state;

  reset_sync u_reset_sync (
    .clk, .rst_n_in(rst_n), .rst_n_out(rst_n_s)
  );

  port_config u_port_config (
    .clk, .rst_n(rst_n_s),
    .mem_en, .mem_rd_wr, .mem_add, .mem_data, .mem_rdata,
    .port_addr
  );

  switch_fsm u_fsm (
    .clk, .rst_n(rst_n_s),
    .data_status, .data_in, .busy,
    .port_addr,
    .fifo_full, .fifo_empty, .fifo_wr, .fifo_din,
    .parity_err, .pkt_drop,
    .state(fsm_state)
  );

  assign fifo_rd = {read_3, read_2, read_1, read_0};

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    sync_fifo #(.DEPTH(FIFO_DEPTH_P), .WIDTH(DATA_W)) u_fifo (
      .clk, .rst_n(rst_n_s),
      .wr_en(fifo_wr[p]), .din(fifo_din),
      .rd_en(fifo_rd[p]), .dout(fifo_dout[p]),
      .full(fifo_full[p]), .empty(fifo_empty[p]),
      .count(fifo_count[p])
    );
  end

  assign {ready_3, ready_2, ready_1, ready_0} = ~fifo_empty;
  assign port_0 = fifo_dout[0];
  assign port_1 = fifo_dout[1];
  assign port_2 = fifo_dout[2];
  assign port_3 = fifo_dout[3];

endmodule
