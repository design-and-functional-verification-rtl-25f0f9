// tb_fifo_count: checks the FIFO count block against an occupancy model.
//
// Random write and read requests drive the block through empty, partly
// filled and full. Every cycle the qualified enables must refuse a write when
// full and a read when empty, and after every rising edge the count and the
// full and empty flags must match the model.
module tb_fifo_count;

  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic wr_req = 1'b0, rd_req = 1'b0;
  logic wr_ok, rd_ok, full, empty;
  logic [4:0] count;
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned m = 0, n_full = 0, n_empty_rd = 0;

  fifo_count #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_req, .rd_req, .wr_ok, .rd_ok,
                                   .count, .full, .empty);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      // drift towards full in the first half, towards empty in the second
      automatic int bias = ((n / 500) % 2 == 0) ? 75 : 25;
      wr_req = ($urandom_range(99) < bias);
      rd_req = ($urandom_range(99) >= bias);
      #1;
      check(wr_ok == (wr_req && m < DEPTH), "wr_ok wrong");
      check(rd_ok == (rd_req && m > 0), "rd_ok wrong");
      if (wr_req && m == DEPTH) n_full++;
      if (rd_req && m == 0) n_empty_rd++;
      @(negedge clk);
      if (wr_req && m < DEPTH && !(rd_req && m > 0)) m++;
      else if (rd_req && m > 0 && !(wr_req && m < DEPTH)) m--;
      check(count == 5'(m), $sformatf("count %0d want %0d", count, m));
      check(full == (m == DEPTH), "full flag wrong");
      check(empty == (m == 0), "empty flag wrong");
    end
    check(n_full > 0 && n_empty_rd > 0, "full or empty never reached with a request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
