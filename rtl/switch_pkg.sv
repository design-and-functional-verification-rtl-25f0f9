// switch_pkg: constants and types shared by the blocks of the 1x4 packet switch.
//
// The switch takes byte-wide packets on one input and forwards each whole
// packet to one of four output FIFOs. A packet is DA, SA, LEN, LEN payload
// bytes and one FCS byte, so it is 4 to 259 bytes long. The FCS is even
// parity over the packet: the XOR of every byte, FCS included, is zero.
// Byte width, port count and FIFO depth (8 bits, 4 ports, 16 entries) follow
// the published design; the encoding of the controller states is this
// design's own.
package switch_pkg;

  localparam int unsigned DATA_W     = 8;   // byte-wide data path
  localparam int unsigned NUM_PORTS  = 4;   // output ports 0..3
  localparam int unsigned PORT_AW    = 2;   // bits of mem_add
  localparam int unsigned FIFO_DEPTH = 16;  // 16x8 output FIFOs
  localparam int unsigned MIN_PKT    = 4;   // LEN = 0
  localparam int unsigned MAX_PKT    = 259; // LEN = 255

  typedef logic [DATA_W-1:0] byte_t;

  // Controller states. Addr_Wait, Data_Load, Parity_Load, Hold_State and
  // Busy_State are the five states of the published controller.
  typedef enum logic [2:0] {
    ST_ADDR_WAIT   = 3'd0,  // idle, waiting for the DA byte
    ST_DATA_LOAD   = 3'd1,  // taking SA, LEN and payload bytes
    ST_PARITY_LOAD = 3'd2,  // taking and checking the FCS byte
    ST_HOLD        = 3'd3,  // destination FIFO full, one byte held
    ST_BUSY        = 3'd4   // destination FIFO not yet drained
  } state_t;

  // Field expected next while in ST_DATA_LOAD.
  typedef enum logic [1:0] {
    FLD_SA      = 2'd0,
    FLD_LEN     = 2'd1,
    FLD_PAYLOAD = 2'd2
  } field_t;

endpackage
