// tb_reg_file: random reads and writes on both read ports against a model
// array; checks that register 0 always reads zero, that reset clears all
// registers and that a read of the register being written returns the new
// value in the same cycle.
module tb_reg_file;
  logic clk = 1'b0, rst = 1'b1;
  logic [4:0] ra1 = '0, ra2 = '0, wa = '0, dbg_ra = '0;
  logic [7:0] rd1, rd2, wd = '0, dbg_rd;
  logic we = 1'b0;
  logic [7:0] model [32];
  int checks = 0, failures = 0, wt_seen = 0;

  reg_file dut (.clk(clk), .rst(rst), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
                .we(we), .wa(wa), .wd(wd), .dbg_ra(dbg_ra), .dbg_rd(dbg_rd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_rd(input logic [4:0] a);
    if (a == 0) return 8'h00;
    if (we && a == wa) return wd;
    return model[a];
  endfunction

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 8'h00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      dbg_ra = 5'(i); #1;
      chk("after reset", dbg_rd, 8'h00);
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we  = ($urandom_range(3, 0) != 0);
      wa  = 5'($urandom);
      wd  = 8'($urandom);
      ra1 = ($urandom_range(3, 0) == 0) ? wa : 5'($urandom);
      ra2 = ($urandom_range(3, 0) == 0) ? wa : 5'($urandom);
      dbg_ra = 5'($urandom);
      #1;
      if (we && wa != 0 && (ra1 == wa || ra2 == wa)) wt_seen++;
      chk("rd1", rd1, expect_rd(ra1));
      chk("rd2", rd2, expect_rd(ra2));
      chk("dbg", dbg_rd, (dbg_ra == 0) ? 8'h00 : model[dbg_ra]);
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    checks++;
    if (wt_seen == 0) begin
      failures++;
      $display("write-through case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
