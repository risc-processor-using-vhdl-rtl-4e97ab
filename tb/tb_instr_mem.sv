// tb_instr_mem: fills every word with a random value, then reads all words
// back in a scrambled order and overwrites some, comparing with a copy kept
// in the testbench.
module tb_instr_mem;
  localparam int WORDS = 64;
  logic clk = 1'b0, we = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instr_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); we = 1'b1; waddr = 6'(a); wdata = d;
    @(posedge clk); #1 we = 1'b0;
    model[a] = d;
  endtask

  task automatic rd_check(input int a);
    raddr = 6'(a); #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("word %0d: got %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) wr(i, $urandom);
    for (int i = 0; i < WORDS; i++) rd_check((i * 37) % WORDS);
    for (int k = 0; k < 100; k++) begin
      if ($urandom_range(1, 0) == 1) wr(int'($urandom_range(WORDS - 1, 0)), $urandom);
      rd_check(int'($urandom_range(WORDS - 1, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
