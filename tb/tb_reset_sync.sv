// tb_reset_sync: checks the reset conditioning block.
//
// The raw reset is dropped and raised at random times, also between clock
// edges. The output must fall at once with the input (before the next clock
// edge) and rise on exactly the second rising edge after the input rises.
module tb_reset_sync;

  logic clk = 1'b0;
  logic rst_n_in = 1'b1;
  logic rst_n_out;
  int unsigned checks = 0, failures = 0, cycles = 0;

  reset_sync dut (.clk, .rst_n_in, .rst_n_out);

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
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      #($urandom_range(1, 9));
      rst_n_in = 1'b0;
      #1 check(rst_n_out == 1'b0, "output did not fall with the input");
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #($urandom_range(1, 4));
      check(rst_n_out == 1'b0, "output high during reset");
      rst_n_in = 1'b1;
      @(posedge clk); #1;
      check(rst_n_out == 1'b0, "released after one edge");
      @(posedge clk); #1;
      check(rst_n_out == 1'b1, "not released after two edges");
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 check(rst_n_out == 1'b1, "output fell without reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
