// tb_universal_shifter: all 256 inputs in each of the three modes (load,
// shift left, shift right), against multiplication and division by two.
module tb_universal_shifter;
  import risc8_pkg::*;
  logic [7:0] a, y;
  shift_mode_e mode;
  int checks = 0, failures = 0;

  universal_shifter dut (.a(a), .mode(mode), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 8'(v);
      mode = SH_LOAD;  #1; checks++; if (y !== 8'(v))           begin failures++; $display("load %0d -> %0d", v, y); end
      mode = SH_LEFT;  #1; checks++; if (y !== 8'((v * 2) % 256)) begin failures++; $display("left %0d -> %0d", v, y); end
      mode = SH_RIGHT; #1; checks++; if (y !== 8'(v / 2))       begin failures++; $display("right %0d -> %0d", v, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
