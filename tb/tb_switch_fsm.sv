// tb_switch_fsm: checks the packet controller on its own.
//
// The four output FIFOs are modelled in the testbench (queues of 16 bytes
// whose full and empty flags feed the controller, drained at random rates).
// Directed part: a 2-byte-payload packet and a zero-payload packet to idle
// ports, checking the state after every byte (Addr_Wait -> Data_Load ->
// Parity_Load -> Addr_Wait), that each byte is written on the edge it is
// taken, and the parity_err and pkt_drop pulses one cycle after the FCS or
// unmatched DA. Random part: packets of 0..255 payload bytes to matching and
// unmatched addresses with good and bad FCS; the byte stream each port
// receives must equal the packets routed to it, no full FIFO may be written,
// busy must be high exactly in Hold_State and Busy_State, and both of those
// states must occur.
module tb_switch_fsm;
  import switch_pkg::*;

  localparam int unsigned CAP = 16;
  logic   clk = 1'b0;
  logic   rst_n = 1'b1;
  logic   data_status = 1'b0;
  byte_t  data_in = '0;
  logic   busy;
  byte_t  port_addr [4] = '{8'h0a, 8'h14, 8'h1e, 8'h28};
  logic [3:0] fifo_full, fifo_empty, fifo_wr;
  byte_t  fifo_din;
  logic   parity_err, pkt_drop;
  state_t state;

  switch_fsm dut (.clk, .rst_n, .data_status, .data_in, .busy, .port_addr,
                  .fifo_full, .fifo_empty, .fifo_wr, .fifo_din,
                  .parity_err, .pkt_drop, .state);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned n_hold = 0, n_busy = 0, n_perr = 0, n_drop = 0, exp_perr = 0, exp_drop = 0;
  byte_t fq [4][$];        // model FIFOs
  byte_t exp_q [4][$];     // expected byte streams
  byte_t got_q [4][$];
  int unsigned rate [4] = '{80, 40, 15, 5};
  bit drain_on = 1'b0;

  always_comb
    for (int p = 0; p < 4; p++) begin
      fifo_full[p]  = (fq[p].size() >= CAP);
      fifo_empty[p] = (fq[p].size() == 0);
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (cycles > 300000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Model FIFOs: take writes and random drains at the rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      check(busy == (state == ST_HOLD || state == ST_BUSY), "busy does not match the state");
      check($countones(fifo_wr) <= 1, "several FIFOs written");
      for (int p = 0; p < 4; p++) begin
        if (fifo_wr[p]) begin
          check(!fifo_full[p], "write to a full FIFO");
          fq[p].push_back(fifo_din);
          got_q[p].push_back(fifo_din);
        end
        if (drain_on && fq[p].size() > 0 && $urandom_range(99) < rate[p]) void'(fq[p].pop_front());
      end
      if (state == ST_HOLD) n_hold++;
      if (state == ST_BUSY) n_busy++;
      if (parity_err) n_perr++;
      if (pkt_drop) n_drop++;
    end
  end

  task automatic send_byte(input byte_t b);
    bit busy_seen;
    data_status = 1'b1;
    data_in     = b;
    do begin
      busy_seen = busy;
      @(negedge clk);
    end while (busy_seen);
    data_status = 1'b0;
    data_in     = byte_t'($urandom);
  endtask

  function automatic int route(input byte_t da);
    for (int p = 0; p < 4; p++) if (port_addr[p] == da) return p;
    return -1;
  endfunction

  function automatic void make_packet(ref byte_t pkt[$], input byte_t da, input byte_t len,
                                      input bit bad);
    byte_t fcs = '0;
    pkt.delete();
    pkt.push_back(da); pkt.push_back(byte_t'($urandom)); pkt.push_back(len);
    for (int i = 0; i < len; i++) pkt.push_back(byte_t'($urandom));
    foreach (pkt[i]) fcs ^= pkt[i];
    if (bad) fcs = ~fcs;
    pkt.push_back(fcs);
  endfunction

  task automatic expect_packet(ref byte_t pkt[$], input bit bad);
    int d = route(pkt[0]);
    if (d >= 0) foreach (pkt[i]) exp_q[d].push_back(pkt[i]);
    else exp_drop++;
    if (bad) exp_perr++;
  endtask

  initial begin
    byte_t pkt [$];
    #1 rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    check(state == ST_ADDR_WAIT && !busy, "not idle after reset");

    // Directed: DA 14 (port 1), LEN 2, with the state checked per byte.
    make_packet(pkt, 8'h14, 8'd2, 1'b0);
    expect_packet(pkt, 1'b0);
    for (int i = 0; i < pkt.size(); i++) begin
      data_status = 1'b1; data_in = pkt[i];
      #1 check(fifo_wr == 4'b0010 && fifo_din == pkt[i], $sformatf("byte %0d not written at once", i));
      @(negedge clk);
      check(state == ((i == 4) ? ST_PARITY_LOAD : (i == 5) ? ST_ADDR_WAIT : ST_DATA_LOAD),
            $sformatf("state %s after byte %0d", state.name(), i));
      if (i == 5) check(parity_err == 1'b0, "good FCS flagged");
    end
    data_status = 1'b0;

    // Directed: zero payload, bad FCS, to port 3: Parity_Load follows LEN.
    make_packet(pkt, 8'h28, 8'd0, 1'b1);
    expect_packet(pkt, 1'b1);
    for (int i = 0; i < pkt.size(); i++) begin
      send_byte(pkt[i]);
      if (i == 2) check(state == ST_PARITY_LOAD, "no Parity_Load after LEN=0");
    end
    check(parity_err == 1'b1 && state == ST_ADDR_WAIT, "bad FCS not flagged one cycle after it");
    @(negedge clk);
    check(parity_err == 1'b0, "parity_err longer than one cycle");

    // Directed: unmatched DA is dropped.
    make_packet(pkt, 8'h99, 8'd3, 1'b0);
    expect_packet(pkt, 1'b0);
    send_byte(pkt[0]);
    check(pkt_drop == 1'b1, "pkt_drop not pulsed after unmatched DA");
    for (int i = 1; i < pkt.size(); i++) send_byte(pkt[i]);

    // Directed: port 1 still holds data, so the next packet for it waits.
    make_packet(pkt, 8'h14, 8'd1, 1'b0);
    expect_packet(pkt, 1'b0);
    send_byte(pkt[0]);
    check(state == ST_BUSY && busy, "no Busy_State for an occupied FIFO");
    drain_on = 1'b1;
    for (int i = 1; i < pkt.size(); i++) send_byte(pkt[i]);

    // Random packets.
    for (int n = 0; n < 300; n++) begin
      automatic byte_t da  = ($urandom_range(9) == 0) ? byte_t'($urandom) : port_addr[$urandom_range(3)];
      automatic byte_t len = ($urandom_range(19) == 0) ? byte_t'($urandom_range(200, 255))
                                             : byte_t'($urandom_range(0, 40));
      automatic bit bad = ($urandom_range(9) == 0);
      make_packet(pkt, da, len, bad);
      expect_packet(pkt, bad);
      foreach (pkt[i]) begin
        if ($urandom_range(9) == 0) begin
          data_status = 1'b0; @(negedge clk);
        end
        send_byte(pkt[i]);
      end
    end
    repeat (3) @(negedge clk);

    for (int p = 0; p < 4; p++) begin
      check(got_q[p].size() == exp_q[p].size(),
            $sformatf("port %0d got %0d bytes want %0d", p, got_q[p].size(), exp_q[p].size()));
      for (int i = 0; i < exp_q[p].size() && i < got_q[p].size(); i++)
        check(got_q[p][i] == exp_q[p][i], $sformatf("port %0d byte %0d wrong", p, i));
    end
    check(n_perr == exp_perr, $sformatf("parity_err %0d want %0d", n_perr, exp_perr));
    check(n_drop == exp_drop, $sformatf("pkt_drop %0d want %0d", n_drop, exp_drop));
    check(n_hold > 0, "Hold_State never used");
    check(n_busy > 0, "Busy_State never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
