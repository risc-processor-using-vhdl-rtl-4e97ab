// tb_timing_gen: checks that exactly one of t1..t4 is high in every cycle,
// that reset starts at t1 and that the phase advances t1, t2, t3, t4, t1 ...
// once per clock, also after a second reset in the middle of a sequence.
module tb_timing_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] t;
  int checks = 0, failures = 0;

  timing_gen dut (.clk(clk), .rst(rst), .t(t));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    int ph = 0;
    for (int i = 0; i < n; i++) begin
      #1;
      checks++;
      if (t !== 4'(1 << ph)) begin
        failures++;
        $display("cycle %0d: t=%b expected phase t%0d", i, t, ph + 1);
      end
      ph = (ph + 1) % 4;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;  // t1 is still high until the next edge
    run(41);
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    run(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
