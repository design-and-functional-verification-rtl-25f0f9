// tb_switch_top: end-to-end self-checking test of the 1x4 packet switch.
//
// Runs the switch with all parameters at their defaults (16x8 FIFOs, four
// ports). A host model writes the four port addresses through the memory
// interface and reads them back. A driver sends packets (DA, SA, LEN,
// payload, FCS) byte by byte, honouring busy and inserting idle cycles with
// data_status low and garbage on data_in. Four receivers drain the output
// FIFOs at different random rates, the slow ones forcing the FIFO-full hold.
// A reference model predicts, for every port, the byte stream it must
// deliver: each packet goes whole to the lowest-numbered port whose address
// equals its DA, and packets matching no port vanish. Directed cases cover a
// minimum (4-byte) and a maximum (259-byte) packet to every port, a packet
// with a bad FCS (forwarded, flagged on parity_err), an unmatched DA
// (pkt_drop), input with data_status low, a back-to-back packet to a port
// whose FIFO is still occupied (Busy_State), and a reset in the middle of a
// packet. The test counts how often each of these mechanisms happened and
// fails if one never did.
//
// Timing model: inputs change on the falling clock edge; a byte offered at a
// falling edge is taken at the next rising edge if busy was low. A read_N
// issued with ready_N high pops at the rising edge and the byte is sampled
// on port_N at the following falling edge.
module tb_switch_top;
  import switch_pkg::*;

  localparam int unsigned NPKT_RANDOM = 400;
  localparam int unsigned WATCHDOG    = 400_000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;  // falls at time 1 so the reset edge is seen
  logic  data_status;
  byte_t data_in;
  logic  busy;
  logic  mem_en, mem_rd_wr;
  logic [PORT_AW-1:0] mem_add;
  byte_t mem_data, mem_rdata;
  logic  [3:0] rd, rdy;
  byte_t port_v [4];
  logic  parity_err, pkt_drop;

  switch_top dut (
    .clk, .rst_n,
    .data_status, .data_in, .busy,
    .mem_en, .mem_rd_wr, .mem_add, .mem_data, .mem_rdata,
    .read_0(rd[0]), .read_1(rd[1]), .read_2(rd[2]), .read_3(rd[3]),
    .ready_0(rdy[0]), .ready_1(rdy[1]), .ready_2(rdy[2]), .ready_3(rdy[3]),
    .port_0(port_v[0]), .port_1(port_v[1]), .port_2(port_v[2]), .port_3(port_v[3]),
    .parity_err, .pkt_drop
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned cycles = 0;

  // mechanism counters
  int unsigned n_hold = 0, n_busy = 0, n_drop_seen = 0, n_perr_seen = 0;
  int unsigned n_min = 0, n_max = 0, n_gap = 0, n_reset_mid = 0, n_mem_read = 0;
  int unsigned n_pkts_port [4] = '{0, 0, 0, 0};
  int unsigned n_drop_exp = 0, n_perr_exp = 0;

  // reference state
  byte_t cfg_addr [4];
  byte_t exp_q [4][$];
  byte_t got_q [4][$];
  logic  pend [4];
  int unsigned rate [4];
  bit    rx_on;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  always @(posedge clk) begin
    cycles++;
    if (cycles > WATCHDOG) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ------------------------------------------------- mechanism observation
  state_t st_prev = ST_ADDR_WAIT;
  always @(posedge clk) begin
    if (dut.u_fsm.state == ST_HOLD && st_prev != ST_HOLD) n_hold++;
    if (dut.u_fsm.state == ST_BUSY && st_prev != ST_BUSY) n_busy++;
    st_prev <= dut.u_fsm.state;
    if (cycles > 2 && pkt_drop)   n_drop_seen++;
    if (cycles > 2 && parity_err) n_perr_seen++;
  end

  // ------------------------------------------------------------- receivers
  always @(negedge clk) begin
    for (int p = 0; p < 4; p++) begin
      if (pend[p]) got_q[p].push_back(port_v[p]);
      if (rx_on && rdy[p] && ($urandom_range(99) < rate[p])) begin
        rd[p]   = 1'b1;
        pend[p] = 1'b1;
      end else begin
        rd[p]   = !rdy[p] && ($urandom_range(3) == 0);  // reads of an empty FIFO are ignored
        pend[p] = 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ host model
  task automatic mem_write(input int p, input byte_t a);
    mem_en = 1'b1; mem_rd_wr = 1'b1; mem_add = PORT_AW'(p); mem_data = a;
    @(negedge clk);
    mem_en = 1'b0; mem_rd_wr = 1'b0; mem_data = 8'h00;
    cfg_addr[p] = a;
  endtask

  task automatic mem_read_check(input int p, input byte_t want);
    mem_en = 1'b1; mem_rd_wr = 1'b0; mem_add = PORT_AW'(p);
    @(negedge clk);
    mem_en = 1'b0;
    check(mem_rdata == want, $sformatf("mem read port %0d got %02h want %02h", p, mem_rdata, want));
    n_mem_read++;
  endtask

  task automatic configure(input byte_t a0, input byte_t a1, input byte_t a2, input byte_t a3);
    mem_write(0, a0); mem_write(1, a1); mem_write(2, a2); mem_write(3, a3);
    mem_read_check(0, a0); mem_read_check(1, a1);
    mem_read_check(2, a2); mem_read_check(3, a3);
  endtask

  // ----------------------------------------------------------------- driver
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

  task automatic idle_cycles(input int n);
    for (int i = 0; i < n; i++) begin
      data_status = 1'b0;
      data_in     = byte_t'($urandom);  // must be ignored
      @(negedge clk);
    end
  endtask

  function automatic int route(input byte_t da);
    for (int p = 0; p < 4; p++) if (cfg_addr[p] == da) return p;
    return -1;
  endfunction

  // Build and send one packet; record what the ports must deliver.
  task automatic send_packet(input byte_t da, input byte_t len, input bit bad_fcs,
                             input int gap_pct);
    byte_t pkt [$];
    byte_t fcs;
    int    dst;
    pkt.push_back(da);
    pkt.push_back(byte_t'($urandom));
    pkt.push_back(len);
    for (int i = 0; i < len; i++) pkt.push_back(byte_t'($urandom));
    fcs = '0;
    foreach (pkt[i]) fcs ^= pkt[i];
    if (bad_fcs) fcs ^= byte_t'(1 << $urandom_range(7));
    pkt.push_back(fcs);

    dst = route(da);
    if (dst < 0) n_drop_exp++;
    else begin
      foreach (pkt[i]) exp_q[dst].push_back(pkt[i]);
      n_pkts_port[dst]++;
    end
    if (bad_fcs) n_perr_exp++;  // checked on dropped packets too
    if (len == 0)   n_min++;
    if (len == 255) n_max++;

    foreach (pkt[i]) begin
      if (i > 0 && $urandom_range(99) < gap_pct) begin
        idle_cycles($urandom_range(1, 3));
        n_gap++;
      end
      send_byte(pkt[i]);
    end
  endtask

  task automatic wait_drained();
    int guard = 0;
    while ((dut.fifo_empty != 4'hF || pend[0] || pend[1] || pend[2] || pend[3]
            || dut.u_fsm.state != ST_ADDR_WAIT) && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic compare_ports(input string phase);
    for (int p = 0; p < 4; p++) begin
      check(got_q[p].size() == exp_q[p].size(),
            $sformatf("%s: port %0d delivered %0d bytes, expected %0d",
                      phase, p, got_q[p].size(), exp_q[p].size()));
      for (int i = 0; i < exp_q[p].size() && i < got_q[p].size(); i++)
        check(got_q[p][i] == exp_q[p][i],
              $sformatf("%s: port %0d byte %0d got %02h want %02h",
                        phase, p, i, got_q[p][i], exp_q[p][i]));
      exp_q[p].delete();
      got_q[p].delete();
    end
  endtask

  // ------------------------------------------------------------------- test
  initial begin
    byte_t addrs [4] = '{8'h0a, 8'h14, 8'h1e, 8'h28};
    data_status = 0; data_in = 0;
    mem_en = 0; mem_rd_wr = 0; mem_add = 0; mem_data = 0;
    rd = '0; rx_on = 1'b0;
    for (int p = 0; p < 4; p++) begin pend[p] = 0; cfg_addr[p] = 0; end
    rate = '{90, 60, 25, 8};
    #1 rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // After reset: empty ports, addresses 0.
    check(rdy == 4'h0, "ports not empty after reset");
    check(busy == 1'b0, "busy after reset");
    for (int p = 0; p < 4; p++) mem_read_check(p, 8'h00);

    // data_status low: nothing may be taken.
    idle_cycles(20);
    check(rdy == 4'h0 && dut.u_fsm.state == ST_ADDR_WAIT, "data taken with data_status low");

    configure(addrs[0], addrs[1], addrs[2], addrs[3]);

    // Directed: the packet printed in the published waveforms, to port 0,
    // with the receiver off so the latency can be checked.
    begin
      byte_t fig [9] = '{8'h0a, 8'h07, 8'h05, 8'h57, 8'hde, 8'h2d, 8'h87, 8'h2b, 8'h00};
      foreach (fig[i]) exp_q[0].push_back(fig[i]);
      n_pkts_port[0]++;
      send_byte(fig[0]);
      // DA taken at the last rising edge: port 0 must already be ready.
      check(rdy == 4'b0001, "ready_0 not raised one cycle after DA");
      for (int i = 1; i < 9; i++) send_byte(fig[i]);
      @(negedge clk);
      check(dut.g_port[0].u_fifo.count == 9, "port 0 FIFO does not hold 9 bytes");
      check(n_perr_seen == 0, "figure packet flagged as bad parity");
    end
    rx_on = 1'b1;
    wait_drained();
    compare_ports("figure packet");

    // Directed: minimum and maximum packets to every port.
    for (int p = 0; p < 4; p++) begin
      send_packet(addrs[p], 8'd0, 1'b0, 0);
      send_packet(addrs[p], 8'd255, 1'b0, 0);
    end
    wait_drained();
    compare_ports("min/max");

    // Directed: bad FCS, unmatched DA, back-to-back to one port.
    rx_on = 1'b0;
    send_packet(addrs[2], 8'd6, 1'b1, 0);
    send_packet(8'h77, 8'd20, 1'b0, 0);
    fork
      send_packet(addrs[2], 8'd3, 1'b0, 0);   // FIFO 2 still occupied: Busy_State
      begin repeat (30) @(negedge clk); rx_on = 1'b1; end
    join
    wait_drained();
    compare_ports("bad fcs / drop / busy");

    // Random traffic.
    for (int n = 0; n < NPKT_RANDOM; n++) begin
      byte_t da, len;
      automatic int k = $urandom_range(99);
      if (k < 85)      da = addrs[$urandom_range(3)];
      else             da = byte_t'($urandom);
      k = $urandom_range(99);
      if (k < 60)      len = byte_t'($urandom_range(0, 12));
      else if (k < 95) len = byte_t'($urandom_range(13, 80));
      else             len = byte_t'($urandom_range(200, 255));
      send_packet(da, len, ($urandom_range(99) < 10), 15);
      if ($urandom_range(99) < 20) idle_cycles($urandom_range(1, 5));
    end
    wait_drained();
    compare_ports("random");

    // Reset in the middle of a packet.
    rx_on = 1'b0;
    repeat (2) @(negedge clk);
    begin
      automatic byte_t da = addrs[1];
      send_byte(da); send_byte(8'h33); send_byte(8'd100);
      for (int i = 0; i < 10; i++) send_byte(byte_t'(i));
      check(rdy[1] == 1'b1, "mid-packet: port 1 not ready");
      rst_n = 1'b0;
      n_reset_mid++;
      @(negedge clk);
      check(rdy == 4'h0, "reset did not empty the FIFOs");
      // keep offering the rest of the packet while and after reset
      data_status = 1'b1; data_in = 8'h55;
      repeat (3) @(negedge clk);
      data_status = 1'b0;
      rst_n = 1'b1;
      repeat (4) @(negedge clk);
      check(rdy == 4'h0 && port_v[1] == 8'h00, "data left at output after reset");
      for (int p = 0; p < 4; p++) mem_read_check(p, 8'h00);
      for (int p = 0; p < 4; p++) cfg_addr[p] = 8'h00;
      for (int p = 0; p < 4; p++) begin exp_q[p].delete(); got_q[p].delete(); end
    end
    // After reset the switch works again once reconfigured.
    configure(8'h14, 8'h0a, 8'h28, 8'h1e);
    rx_on = 1'b1;
    for (int p = 0; p < 4; p++) send_packet(cfg_addr[p], byte_t'(5 + p), 1'b0, 10);
    wait_drained();
    compare_ports("after reset");

    // Counts of flagged packets and mechanisms.
    check(n_perr_seen == n_perr_exp, $sformatf("parity_err pulses %0d, expected %0d", n_perr_seen, n_perr_exp));
    check(n_drop_seen == n_drop_exp, $sformatf("pkt_drop pulses %0d, expected %0d", n_drop_seen, n_drop_exp));
    $display("mechanisms: hold=%0d busy=%0d drop=%0d parity_err=%0d min=%0d max=%0d gaps=%0d reset_mid=%0d mem_reads=%0d",
             n_hold, n_busy, n_drop_seen, n_perr_seen, n_min, n_max, n_gap, n_reset_mid, n_mem_read);
    $display("packets per port: %0d %0d %0d %0d", n_pkts_port[0], n_pkts_port[1], n_pkts_port[2], n_pkts_port[3]);
    check(n_hold > 0,      "Hold_State never entered");
    check(n_busy > 0,      "Busy_State never entered");
    check(n_drop_seen > 0, "no packet dropped");
    check(n_perr_seen > 0, "no parity error flagged");
    check(n_min > 0 && n_max > 0, "min or max packet not sent");
    check(n_gap > 0,       "no data_status gap");
    check(n_reset_mid > 0, "no reset during a packet");
    for (int p = 0; p < 4; p++) check(n_pkts_port[p] > 0, $sformatf("port %0d never used", p));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
