// tb_alu_control: every ALUOp with every funct code, against the expected
// unit selection and control lines listed here.
module tb_alu_control;
  import risc8_pkg::*;
  aluop_e alu_op;
  logic [5:0] funct;
  alu_op_e alu_ctrl;
  ex_sel_e ex_sel;
  shift_mode_e shift_mode;
  logic rot_left;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(alu_op), .funct(funct), .alu_ctrl(alu_ctrl), .ex_sel(ex_sel),
                   .shift_mode(shift_mode), .rot_left(rot_left));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int op, input int f, input alu_op_e ea, input ex_sel_e es,
                     input shift_mode_e em, input logic er);
    checks++;
    if (alu_ctrl !== ea || ex_sel !== es || (es == EX_SHIFT && shift_mode !== em) ||
        (es == EX_ROT && rot_left !== er)) begin
      failures++;
      $display("aluop %0d funct %h: got %s %s %s %b", op, f, alu_ctrl.name(), ex_sel.name(),
               shift_mode.name(), rot_left);
    end
  endtask

  initial begin
    for (int f = 0; f < 64; f++) begin
      funct = 6'(f);
      alu_op = ALUOP_ADD; #1; chk(0, f, ALU_ADD, EX_ALU, SH_LOAD, 1'b0);
      alu_op = ALUOP_SUB; #1; chk(1, f, ALU_SUB, EX_ALU, SH_LOAD, 1'b0);
      alu_op = ALUOP_FUNCT; #1;
      case (f)
        'h20: chk(2, f, ALU_ADD, EX_ALU, SH_LOAD, 1'b0);
        'h22: chk(2, f, ALU_SUB, EX_ALU, SH_LOAD, 1'b0);
        'h24: chk(2, f, ALU_AND, EX_ALU, SH_LOAD, 1'b0);
        'h25: chk(2, f, ALU_OR,  EX_ALU, SH_LOAD, 1'b0);
        'h26: chk(2, f, ALU_XOR, EX_ALU, SH_LOAD, 1'b0);
        'h27: chk(2, f, ALU_NOR, EX_ALU, SH_LOAD, 1'b0);
        'h2A: chk(2, f, ALU_SLT, EX_ALU, SH_LOAD, 1'b0);
        'h00: chk(2, f, ALU_ADD, EX_SHIFT, SH_LEFT, 1'b0);
        'h01: chk(2, f, ALU_ADD, EX_SHIFT, SH_LOAD, 1'b0);
        'h02: chk(2, f, ALU_ADD, EX_SHIFT, SH_RIGHT, 1'b0);
        'h04: chk(2, f, ALU_ADD, EX_ROT, SH_LOAD, 1'b1);
        'h06: chk(2, f, ALU_ADD, EX_ROT, SH_LOAD, 1'b0);
        default: chk(2, f, ALU_ADD, EX_ALU, SH_LOAD, 1'b0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
