// tb_barrel_rotator: every input, every rotate amount and both directions,
// against a rotation built one bit at a time in the testbench.
module tb_barrel_rotator;
  logic [7:0] a, y;
  logic [2:0] amount;
  logic left;
  int checks = 0, failures = 0;

  barrel_rotator dut (.a(a), .amount(amount), .left(left), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_rot(input logic [7:0] v, input int n, input logic l);
    logic [7:0] r = v;
    for (int i = 0; i < n; i++) r = l ? {r[6:0], r[7]} : {r[0], r[7:1]};
    return r;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++)
      for (int n = 0; n < 8; n++)
        for (int d = 0; d < 2; d++) begin
          a = 8'(v); amount = 3'(n); left = d[0]; #1;
          checks++;
          if (y !== ref_rot(8'(v), n, d[0])) begin
            failures++;
            $display("rot %h by %0d left=%0d: got %h", v, n, d, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
