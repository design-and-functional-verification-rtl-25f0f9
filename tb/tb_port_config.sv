// tb_port_config: checks the memory interface holding the port addresses.
//
// After reset every port address reads 0. Random writes and reads through
// mem_en/mem_rd_wr/mem_add/mem_data are compared with a register model: a
// write changes port_addr after the edge, a read returns the register on
// mem_rdata after the edge, and mem_rdata holds when there is no read.
// Accesses with mem_en low must change nothing.
module tb_port_config;
  import switch_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b1;
  logic  mem_en = 1'b0, mem_rd_wr = 1'b0;
  logic [1:0] mem_add = '0;
  byte_t mem_data = '0, mem_rdata;
  byte_t port_addr [4];
  byte_t model [4];
  byte_t want_rd = '0;
  int unsigned checks = 0, failures = 0, cycles = 0;

  port_config dut (.clk, .rst_n, .mem_en, .mem_rd_wr, .mem_add, .mem_data, .mem_rdata, .port_addr);

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
    for (int p = 0; p < 4; p++) begin
      model[p] = '0;
      check(port_addr[p] == 8'h00, "address not 0 after reset");
    end
    check(mem_rdata == 8'h00, "mem_rdata not 0 after reset");
    for (int n = 0; n < 2000; n++) begin
      mem_en    = ($urandom_range(3) != 0);
      mem_rd_wr = $urandom_range(1);
      mem_add   = 2'($urandom);
      mem_data  = byte_t'($urandom);
      @(negedge clk);
      if (mem_en && mem_rd_wr)  model[mem_add] = mem_data;
      if (mem_en && !mem_rd_wr) want_rd = model[mem_add];
      check(mem_rdata == want_rd, $sformatf("mem_rdata %02h want %02h", mem_rdata, want_rd));
      for (int p = 0; p < 4; p++)
        check(port_addr[p] == model[p], $sformatf("port %0d address %02h want %02h", p, port_addr[p], model[p]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
