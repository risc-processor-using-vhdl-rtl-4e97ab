// tb_control_unit: every 6-bit opcode, against the expected control table
// written out here signal by signal. Unused opcodes must give a no-operation.
module tb_control_unit;
  import risc8_pkg::*;
  logic [5:0] opcode;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected: {reg_dst, jump, branch, mem_read, mem_to_reg, alu_op[1:0], mem_write, alu_src, reg_write}
  function automatic logic [9:0] expected(input int op);
    case (op)
      'h00: return 10'b1_0_0_0_1_10_0_0_1;  // R-type
      'h23: return 10'b0_0_0_1_0_00_0_1_1;  // lw
      'h2B: return 10'b0_0_0_0_0_00_1_1_0;  // sw
      'h04: return 10'b0_0_1_0_0_01_0_0_0;  // beq
      'h08: return 10'b0_0_0_0_1_00_0_1_1;  // addi
      'h02: return 10'b0_1_0_0_0_00_0_0_0;  // j
      default: return 10'b0;
    endcase
  endfunction

  initial begin
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op); #1;
      checks++;
      if (10'(ctrl) !== expected(op)) begin
        failures++;
        $display("opcode %h: got %b expected %b", op, 10'(ctrl), expected(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
