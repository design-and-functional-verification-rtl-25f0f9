// tb_fifo_mem: checks the FIFO storage with its write and read blocks.
//
// Random writes and reads at random locations are compared with an array
// model. A read must place the addressed byte on dout after the rising edge
// and dout must hold its value in cycles without a read. Reset must clear
// dout and the whole array.
module tb_fifo_mem;

  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [3:0] wptr = '0, rptr = '0;
  logic [7:0] din = '0, dout;
  logic [7:0] model [DEPTH];
  logic [7:0] want = '0;
  int unsigned checks = 0, failures = 0, cycles = 0;

  fifo_mem #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .rst_n, .wr_en, .wptr, .din,
                                            .rd_en, .rptr, .dout);

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
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    check(dout == 8'h00, "dout not cleared by reset");
    // reading every location right after reset gives zeros
    for (int i = 0; i < DEPTH; i++) begin
      rd_en = 1'b1; rptr = 4'(i);
      @(negedge clk);
      check(dout == 8'h00, "array not cleared by reset");
    end
    for (int n = 0; n < 3000; n++) begin
      wr_en = $urandom_range(1);
      rd_en = ($urandom_range(2) == 0);
      wptr  = 4'($urandom);
      rptr  = 4'($urandom);
      din   = 8'($urandom);
      @(negedge clk);
      if (rd_en) want = model[rptr];   // read sees the contents before this edge
      if (wr_en) model[wptr] = din;
      check(dout == want, $sformatf("dout %02h want %02h", dout, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
