// tb_data_memory: random stores and loads over all 256 addresses against a
// model array; a load with MemRead low must read zero, and a cycle with
// MemWrite low must leave the memory unchanged.
module tb_data_memory;
  logic clk = 1'b0;
  logic mem_read = 1'b0, mem_write = 1'b0;
  logic [7:0] addr = '0, wdata = '0, rdata, dbg_addr = '0, dbg_data;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  data_memory dut (.clk(clk), .mem_read(mem_read), .mem_write(mem_write), .addr(addr),
                   .wdata(wdata), .rdata(rdata), .dbg_addr(dbg_addr), .dbg_data(dbg_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s addr %0d: got %h expected %h", what, addr, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); mem_write = 1'b1; addr = 8'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); mem_write = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      mem_write = ($urandom_range(2, 0) == 0);
      mem_read  = ($urandom_range(3, 0) != 0);
      addr      = 8'($urandom);
      wdata     = 8'($urandom);
      dbg_addr  = 8'($urandom);
      #1;
      chk("read", rdata, mem_read ? model[addr] : 8'h00);
      chk("dbg", dbg_data, model[dbg_addr]);
      @(posedge clk);
      if (mem_write) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
