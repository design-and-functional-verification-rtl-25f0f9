// switch_fsm: packet controller of the 1x4 switch.
//
// The controller takes a packet byte by byte from the input port and writes
// it, unchanged and whole (DA, SA, LEN, payload, FCS), into the FIFO of the
// output port whose configured address equals the DA byte. It has the five
// states of the published controller:
//   Addr_Wait   waits for data_status and the DA byte, and picks the port.
//   Busy_State  the chosen port's FIFO still holds an earlier packet; the DA
//               byte is held and the input is stalled until that FIFO drains.
//   Data_Load   takes SA, LEN and the LEN payload bytes (LEN sets the count).
//   Parity_Load takes the FCS byte and checks that the XOR of all bytes of
//               the packet, FCS included, is zero.
//   Hold_State  the FIFO filled up; the byte just taken is held and the input
//               is stalled until there is room for it.
// The states, the DA match, the LEN-driven packet length and the even parity
// check follow the published design. The way the two waiting states stall
// the sender (the busy output), the choice to drop a packet whose DA matches
// no port, and the choice to forward a packet with a bad FCS while flagging
// it on parity_err are this design's own.
//
// Input handshake: a byte on data_in is taken on a rising edge where
// data_status is high and busy is low. busy depends only on the state, so the
// sender can look at it before offering a byte. data_status may drop in the
// middle of a packet; the controller then waits.
// Outputs: fifo_wr[i]/fifo_din write a byte into FIFO i (combinational, the
// FIFO takes it on the same edge). parity_err and pkt_drop are one-cycle
// pulses in the cycle after the FCS byte or the unmatched DA byte was taken.
// If several ports share an address, the lowest-numbered port wins.
module switch_fsm
  import switch_pkg::*;
#(
  parameter int unsigned PORTS = NUM_PORTS
) (
  input  logic  clk,
  input  logic  rst_n,
  // input port
  input  logic  data_status,
  input  byte_t data_in,
  output logic  busy,
  // configured port addresses
  input  byte_t port_addr [PORTS],
  // output FIFOs
  input  logic [PORTS-1:0] fifo_full,
  input  logic [PORTS-1:0] fifo_empty,
  output logic [PORTS-1:0] fifo_wr,
  output byte_t            fifo_din,
  // status
  output logic  parity_err,
  output logic  pkt_drop,
  output state_t state
);

  localparam int unsigned PW = (PORTS > 1) ? $clog2(PORTS) : 1;

  state_t          state_n;
  field_t          field_q, field_n;
  logic [PW-1:0]   dest_q, dest_n;
  logic            drop_q, drop_n;
  byte_t           rem_q, rem_n;       // payload bytes still to come
  byte_t           parity_q, parity_n; // running XOR of the packet
  byte_t           hold_q, hold_n;     // byte waiting for its FIFO
  state_t          after_q, after_n;   // state to resume after a wait
  logic            perr_n, drop_pulse_n;

  // Address match of the incoming byte against the configured ports.
  logic            hit;
  logic [PW-1:0]   hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = PORTS - 1; i >= 0; i--) begin
      if (data_in == port_addr[i]) begin
        hit     = 1'b1;
        hit_idx = PW'(i);
      end
    end
  end

  assign busy = (state == ST_HOLD) || (state == ST_BUSY);

  always_comb begin
    state_n      = state;
    field_n      = field_q;
    dest_n       = dest_q;
    drop_n       = drop_q;
    rem_n        = rem_q;
    parity_n     = parity_q;
    hold_n       = hold_q;
    after_n      = after_q;
    perr_n       = 1'b0;
    drop_pulse_n = 1'b0;
    fifo_wr      = '0;
    fifo_din     = data_in;

    unique case (state)
      ST_ADDR_WAIT: begin
        if (data_status) begin
          parity_n = data_in;
          field_n  = FLD_SA;
          if (!hit) begin
            drop_n       = 1'b1;
            drop_pulse_n = 1'b1;
            state_n      = ST_DATA_LOAD;
          end else begin
            drop_n = 1'b0;
            dest_n = hit_idx;
            if (fifo_empty[hit_idx]) begin
              fifo_wr[hit_idx] = 1'b1;
              state_n          = ST_DATA_LOAD;
            end else begin
              hold_n  = data_in;
              after_n = ST_DATA_LOAD;
              state_n = ST_BUSY;
            end
          end
        end
      end

      ST_BUSY: begin
        fifo_din = hold_q;
        if (fifo_empty[dest_q]) begin
          fifo_wr[dest_q] = 1'b1;
          state_n         = after_q;
        end
      end

      ST_HOLD: begin
        fifo_din = hold_q;
        if (!fifo_full[dest_q]) begin
          fifo_wr[dest_q] = 1'b1;
          state_n         = after_q;
        end
      end

      ST_DATA_LOAD, ST_PARITY_LOAD: begin
        if (data_status) begin
          state_t nxt;
          parity_n = parity_q ^ data_in;
          nxt      = ST_DATA_LOAD;
          if (state == ST_PARITY_LOAD) begin
            nxt    = ST_ADDR_WAIT;
            perr_n = ((parity_q ^ data_in) != '0);
          end else begin
            unique case (field_q)
              FLD_SA: field_n = FLD_LEN;
              FLD_LEN: begin
                rem_n   = data_in;
                field_n = FLD_PAYLOAD;
                if (data_in == '0) nxt = ST_PARITY_LOAD;
              end
              default: begin
                rem_n = rem_q - 1'b1;
                if (rem_q == 8'd1) nxt = ST_PARITY_LOAD;
              end
            endcase
          end
          if (drop_q) begin
            state_n = nxt;
          end else if (!fifo_full[dest_q]) begin
            fifo_wr[dest_q] = 1'b1;
            state_n         = nxt;
          end else begin
            hold_n  = data_in;
            after_n = nxt;
            state_n = ST_HOLD;
          end
        end
      end

      default: state_n = ST_ADDR_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_ADDR_WAIT;
      field_q    <= FLD_SA;
      dest_q     <= '0;
      drop_q     <= 1'b0;
      rem_q      <= '0;
      parity_q   <= '0;
      hold_q     <= '0;
      after_q    <= ST_ADDR_WAIT;
      parity_err <= 1'b0;
      pkt_drop   <= 1'b0;
    end else begin
      state      <= state_n;
      field_q    <= field_n;
      dest_q     <= dest_n;
      drop_q     <= drop_n;
      rem_q      <= rem_n;
      parity_q   <= parity_n;
      hold_q     <= hold_n;
      after_q    <= after_n;
      parity_err <= perr_n;
      pkt_drop   <= drop_pulse_n;
    end
  end

  // A byte is written only to the port chosen for the current packet, and
  // never while the packet is being dropped.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ($countones(fifo_wr) <= 1) else $error("switch_fsm: two FIFOs written");
      assert (!(drop_q && state != ST_ADDR_WAIT && fifo_wr != '0))
        else $error("switch_fsm: write while dropping");
    end
  end

endmodule
