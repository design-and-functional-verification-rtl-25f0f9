// tb_switch_cases: the published switch test cases, one after another.
//
// Each case starts from a fresh reset, as the published waveforms do:
//   1-4  one port at a time: port p alone is given address 0a and the packet
//        0a 07 05 57 de 2d 87 2b 00 (LEN 5) must appear, whole and in order,
//        on port p only. With read_p held high the bytes leave at one per
//        clock: ready_p rises one cycle after the DA is taken and the last
//        byte is on port_p 10 cycles after the DA.
//   5    minimum packet (LEN 0, 4 bytes) and maximum packet (LEN 255,
//        259 bytes) to each port with the receiver reading every cycle: the
//        input never stalls, so 259 bytes take 259 input cycles.
//   6    the maximum packet with the receiver stopped: the FIFO fills after
//        16 bytes and busy stalls the input until the receiver resumes.
//   7    data_status held low for 50 cycles with random data_in: nothing is
//        taken.
//   8    bad FCS: the packet is still delivered and parity_err pulses once.
//   9    all ports configured (0a 14 1e 28) and a packet sent to each.
//  10    reset in the middle of a packet while the sender keeps offering
//        bytes: the FIFOs empty at once and no data leaves any port.
module tb_switch_cases;
  import switch_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  data_status = 1'b0;
  byte_t data_in = '0;
  logic  busy;
  logic  mem_en = 1'b0, mem_rd_wr = 1'b0;
  logic [1:0] mem_add = '0;
  byte_t mem_data = '0, mem_rdata;
  logic [3:0] rd = '0, rdy;
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

  int unsigned checks = 0, failures = 0, cycles = 0;
  byte_t got [4][$];
  logic  pend [4] = '{0, 0, 0, 0};
  int unsigned n_perr = 0, n_busy_cycles = 0;
  int unsigned last_byte_cycle [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (parity_err) n_perr++;
    if (busy && data_status) n_busy_cycles++;
  end

  // Receivers: read_N is driven by the test; popped bytes are collected at
  // the falling edge after the pop.
  always @(negedge clk)
    for (int p = 0; p < 4; p++) begin
      if (pend[p]) begin
        got[p].push_back(port_v[p]);
        last_byte_cycle[p] = cycles;
      end
      pend[p] = rd[p] && rdy[p];
    end

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int p = 0; p < 4; p++) got[p].delete();
    n_perr = 0;
  endtask

  task automatic mem_write(input int p, input byte_t a);
    mem_en = 1'b1; mem_rd_wr = 1'b1; mem_add = 2'(p); mem_data = a;
    @(negedge clk);
    mem_en = 1'b0; mem_rd_wr = 1'b0;
  endtask

  task automatic send_byte(input byte_t b);
    bit busy_seen;
    data_status = 1'b1;
    data_in     = b;
    do begin
      busy_seen = busy;
      @(negedge clk);
    end while (busy_seen);
    data_status = 1'b0;
  endtask

  task automatic make_packet(ref byte_t pkt[$], input byte_t da, input byte_t len, input bit bad);
    byte_t fcs = '0;
    pkt.delete();
    pkt.push_back(da); pkt.push_back(8'h07); pkt.push_back(len);
    for (int i = 0; i < len; i++) pkt.push_back(byte_t'($urandom));
    foreach (pkt[i]) fcs ^= pkt[i];
    if (bad) fcs ^= 8'h01;
    pkt.push_back(fcs);
  endtask

  task automatic expect_only(input int p, ref byte_t pkt[$], input string what);
    for (int q = 0; q < 4; q++) begin
      if (q == p) begin
        check(got[q].size() == pkt.size(),
              $sformatf("%s: port %0d got %0d bytes want %0d", what, q, got[q].size(), pkt.size()));
        for (int i = 0; i < pkt.size() && i < got[q].size(); i++)
          check(got[q][i] == pkt[i], $sformatf("%s: byte %0d got %02h want %02h", what, i, got[q][i], pkt[i]));
      end else begin
        check(got[q].size() == 0, $sformatf("%s: port %0d received data", what, q));
      end
      got[q].delete();
    end
  endtask

  initial begin
    byte_t fig [$] = '{8'h0a, 8'h07, 8'h05, 8'h57, 8'hde, 8'h2d, 8'h87, 8'h2b, 8'h00};
    byte_t pkt [$];
    int    t0;
    #1 rst_n = 1'b0;

    // Cases 1-4: one port at a time.
    for (int p = 0; p < 4; p++) begin
      do_reset();
      mem_write(p, 8'h0a);
      rd = 4'hF;
      t0 = cycles;
      send_byte(fig[0]);
      check(rdy == 4'(1 << p), $sformatf("port %0d: ready not raised one cycle after DA", p));
      for (int i = 1; i < fig.size(); i++) send_byte(fig[i]);
      repeat (3) @(negedge clk);
      check(last_byte_cycle[p] - t0 == 10,
            $sformatf("port %0d: last byte after %0d cycles, want 10", p, last_byte_cycle[p] - t0));
      check(n_perr == 0, "good packet flagged");
      expect_only(p, fig, $sformatf("port %0d case", p));
      rd = 4'h0;
    end

    // Case 5: minimum and maximum packets at full rate.
    do_reset();
    mem_write(0, 8'h0a); mem_write(1, 8'h14); mem_write(2, 8'h1e); mem_write(3, 8'h28);
    rd = 4'hF;
    for (int p = 0; p < 4; p++) begin
      byte_t addrs [4] = '{8'h0a, 8'h14, 8'h1e, 8'h28};
      make_packet(pkt, addrs[p], 8'd0, 1'b0);
      check(pkt.size() == MIN_PKT, "minimum packet is not 4 bytes");
      foreach (pkt[i]) send_byte(pkt[i]);
      repeat (4) @(negedge clk);
      expect_only(p, pkt, "minimum packet");
      make_packet(pkt, addrs[p], 8'd255, 1'b0);
      check(pkt.size() == MAX_PKT, "maximum packet is not 259 bytes");
      t0 = cycles;
      n_busy_cycles = 0;
      foreach (pkt[i]) send_byte(pkt[i]);
      check(cycles - t0 == MAX_PKT, $sformatf("259 bytes took %0d input cycles", cycles - t0));
      check(n_busy_cycles == 0, "input stalled with the receiver reading every cycle");
      repeat (4) @(negedge clk);
      expect_only(p, pkt, "maximum packet");
    end

    // Case 6: maximum packet with a stopped receiver: FIFO fills, busy stalls.
    rd = 4'h0;
    make_packet(pkt, 8'h1e, 8'd255, 1'b0);
    n_busy_cycles = 0;
    fork
      foreach (pkt[i]) send_byte(pkt[i]);
      begin
        repeat (40) @(negedge clk);
        check(dut.g_port[2].u_fifo.full && busy, "FIFO 2 not full and stalling");
        check(dut.u_fsm.state == ST_HOLD, "not in Hold_State with a full FIFO");
        rd[2] = 1'b1;
      end
    join
    while (rdy[2]) @(negedge clk);
    repeat (2) @(negedge clk);
    check(n_busy_cycles > 0, "no stall seen");
    expect_only(2, pkt, "stalled maximum packet");

    // Case 7: data_status low.
    rd = 4'hF;
    for (int i = 0; i < 50; i++) begin
      data_status = 1'b0; data_in = (i % 2 == 0) ? 8'h0a : byte_t'($urandom);
      @(negedge clk);
    end
    check(rdy == 4'h0 && dut.u_fsm.state == ST_ADDR_WAIT, "data taken with data_status low");
    for (int p = 0; p < 4; p++) check(got[p].size() == 0, "data delivered with data_status low");

    // Case 8: bad FCS.
    make_packet(pkt, 8'h14, 8'd5, 1'b1);
    foreach (pkt[i]) send_byte(pkt[i]);
    repeat (4) @(negedge clk);
    check(n_perr == 1, $sformatf("parity_err pulsed %0d times, want 1", n_perr));
    expect_only(1, pkt, "bad FCS packet");

    // Case 9: all ports covered, packets back to back.
    begin
      byte_t all [4][$];
      byte_t addrs [4] = '{8'h0a, 8'h14, 8'h1e, 8'h28};
      for (int p = 3; p >= 0; p--) begin
        make_packet(pkt, addrs[p], byte_t'(8 + p), 1'b0);
        all[p] = pkt;
        foreach (pkt[i]) send_byte(pkt[i]);
      end
      repeat (4) @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        check(got[p].size() == all[p].size(), $sformatf("all ports: port %0d size", p));
        for (int i = 0; i < all[p].size() && i < got[p].size(); i++)
          check(got[p][i] == all[p][i], $sformatf("all ports: port %0d byte %0d", p, i));
        got[p].delete();
      end
    end

    // Case 10: reset in the middle of a packet.
    rd = 4'h0;
    make_packet(pkt, 8'h28, 8'd30, 1'b0);
    for (int i = 0; i < 12; i++) send_byte(pkt[i]);
    check(rdy[3], "port 3 not ready mid-packet");
    rst_n = 1'b0;
    data_status = 1'b1; data_in = pkt[12];   // the sender keeps offering bytes
    @(negedge clk);
    check(rdy == 4'h0, "reset did not empty the FIFOs");
    repeat (2) @(negedge clk);
    data_status = 1'b0;
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    rd = 4'hF;
    repeat (10) @(negedge clk);
    check(mem_rdata == 8'h00 && dut.u_fsm.state == ST_ADDR_WAIT, "switch not idle after reset");
    for (int p = 0; p < 4; p++) check(got[p].size() == 0 && port_v[p] == 8'h00,
                                      $sformatf("port %0d output after reset", p));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
