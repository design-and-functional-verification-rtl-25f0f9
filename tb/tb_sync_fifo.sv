// tb_sync_fifo: checks the 16x8 FIFO against a queue model.
//
// Directed part: fill the FIFO with 16 bytes (full rises exactly at 16, a
// 17th write is ignored), then drain it (each popped byte is on dout after
// the pop edge, empty rises after the 16th pop, a pop of an empty FIFO
// changes nothing). Random part: pushes and pops with varying bias, also on
// the same edge, compared byte for byte with the model.
module tb_sync_fifo;

  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] din = '0, dout;
  logic full, empty;
  logic [4:0] count;
  logic [7:0] q [$];
  logic [7:0] last = '0;
  int unsigned checks = 0, failures = 0, cycles = 0;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .rst_n, .wr_en, .din, .rd_en,
                                             .dout, .full, .empty, .count);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
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

  // One cycle: apply the request at the falling edge, update the model after
  // the next falling edge and compare.
  task automatic step(input bit w, input bit r, input logic [7:0] d);
    bit do_w, do_r;
    wr_en = w; rd_en = r; din = d;
    do_w = w && (q.size() < DEPTH);
    do_r = r && (q.size() > 0);
    @(negedge clk);
    if (do_r) last = q.pop_front();
    if (do_w) q.push_back(d);
    check(dout == last, $sformatf("dout %02h want %02h", dout, last));
    check(count == 5'(q.size()), $sformatf("count %0d want %0d", count, q.size()));
    check(full == (q.size() == DEPTH), "full flag wrong");
    check(empty == (q.size() == 0), "empty flag wrong");
    wr_en = 1'b0; rd_en = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    check(empty && !full && dout == 8'h00, "not empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      check(!full, "full before 16 entries");
      step(1'b1, 1'b0, 8'(8'h40 + i));
    end
    check(full && count == 5'd16, "not full after 16 writes");
    step(1'b1, 1'b0, 8'hee);          // ignored
    for (int i = 0; i < DEPTH; i++) begin
      step(1'b0, 1'b1, 8'h00);
      check(dout == 8'(8'h40 + i), "FIFO order broken");
    end
    check(empty, "not empty after 16 reads");
    step(1'b0, 1'b1, 8'h00);          // ignored, dout holds
    check(dout == 8'h4f, "dout changed on read of empty FIFO");
    for (int n = 0; n < 4000; n++) begin
      automatic int bias = ((n / 400) % 2 == 0) ? 70 : 30;
      step($urandom_range(99) < bias, $urandom_range(99) >= bias, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
