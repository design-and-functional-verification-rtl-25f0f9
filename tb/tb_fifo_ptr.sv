// tb_fifo_ptr: checks the FIFO pointer block against a counter model.
//
// Random write and read enables are applied on falling edges; after every
// rising edge both pointers must equal the number of enabled cycles modulo
// the depth (16), and reset must return them to zero.
module tb_fifo_ptr;

  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [3:0] wptr, rptr;
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned mw = 0, mr = 0;

  fifo_ptr #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .rd_en, .wptr, .rptr);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
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
    check(wptr == 0 && rptr == 0, "pointers not zero after reset");
    for (int n = 0; n < 2000; n++) begin
      wr_en = $urandom_range(1);
      rd_en = $urandom_range(1);
      if (n == 1000) rst_n = 1'b0;
      @(negedge clk);
      if (!rst_n) begin mw = 0; mr = 0; rst_n = 1'b1; end
      else begin
        if (wr_en) mw = (mw + 1) % DEPTH;
        if (rd_en) mr = (mr + 1) % DEPTH;
      end
      check(wptr == 4'(mw), $sformatf("wptr %0d want %0d", wptr, mw));
      check(rptr == 4'(mr), $sformatf("rptr %0d want %0d", rptr, mr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
