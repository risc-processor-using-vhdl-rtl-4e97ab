// tb_fetch_unit: loads a program of random words, then checks that the PC
// starts at 0 after reset, steps by 4 each clock, wraps at the top of the
// address space and that a redirect loads its target on the next edge;
// the instruction read at each PC must be the word stored there.
module tb_fetch_unit;
  logic clk = 1'b0, rst = 1'b1;
  logic redirect = 1'b0, prog_we = 1'b0;
  logic [7:0] redirect_target = '0, pc, pc_plus4;
  logic [5:0] prog_addr = '0;
  logic [31:0] prog_data = '0, instr;
  logic [31:0] model [64];
  int checks = 0, failures = 0, redirects = 0;

  fetch_unit dut (.clk(clk), .rst(rst), .redirect(redirect), .redirect_target(redirect_target),
                  .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
                  .pc(pc), .pc_plus4(pc_plus4), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] exp_pc;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = 6'(i); prog_data = $urandom; model[i] = prog_data;
    end
    @(negedge clk); prog_we = 1'b0; rst = 1'b0;
    exp_pc = 8'h00;
    for (int k = 0; k < 300; k++) begin
      #1;
      chk("pc", 32'(pc), 32'(exp_pc));
      chk("pc+4", 32'(pc_plus4), 32'(8'(exp_pc + 8'd4)));
      chk("instr", instr, model[exp_pc[7:2]]);
      redirect = ($urandom_range(4, 0) == 0);
      redirect_target = {6'($urandom), 2'b00};
      if (redirect) redirects++;
      @(negedge clk);
      exp_pc = redirect ? redirect_target : 8'(exp_pc + 8'd4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
