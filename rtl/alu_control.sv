// alu_control: second instruction decoder, steering the execute units.
//
// From ALUOp (main decoder) and the funct field it chooses which execute unit
// produces the result (ALU, universal shifter or barrel rotator) and sends
// each its control lines: the ALU operation, the shifter mode, the rotate
// direction. ALUOp 00 adds and 01 subtracts whatever the funct field holds;
// ALUOp 10 decodes funct. The mapping of funct codes is this design's own.
// An unknown funct makes the ALU add.
//
// Interface: alu_op, funct in; alu_ctrl, ex_sel, shift_mode, rot_left out.
// Purely combinational.
module alu_control
  import risc8_pkg::*;
(
  input  aluop_e      alu_op,
  input  logic [5:0]  funct,
  output alu_op_e     alu_ctrl,
  output ex_sel_e     ex_sel,
  output shift_mode_e shift_mode,
  output logic        rot_left
);
  always_comb begin
    alu_ctrl   = ALU_ADD;
    ex_sel     = EX_ALU;
    shift_mode = SH_LOAD;
    rot_left   = 1'b0;
    case (alu_op)
      ALUOP_ADD: alu_ctrl = ALU_ADD;
      ALUOP_SUB: alu_ctrl = ALU_SUB;
      ALUOP_FUNCT: begin
        case (funct)
          F_ADD:  alu_ctrl = ALU_ADD;
          F_SUB:  alu_ctrl = ALU_SUB;
          F_AND:  alu_ctrl = ALU_AND;
          F_OR:   alu_ctrl = ALU_OR;
          F_XOR:  alu_ctrl = ALU_XOR;
          F_NOR:  alu_ctrl = ALU_NOR;
          F_SLT:  alu_ctrl = ALU_SLT;
          F_SHL:  begin ex_sel = EX_SHIFT; shift_mode = SH_LEFT;  end
          F_SHR:  begin ex_sel = EX_SHIFT; shift_mode = SH_RIGHT; end
          F_LOAD: begin ex_sel = EX_SHIFT; shift_mode = SH_LOAD;  end
          F_ROL:  begin ex_sel = EX_ROT;   rot_left   = 1'b1;     end
          F_ROR:  begin ex_sel = EX_ROT;   rot_left   = 1'b0;     end
          default: alu_ctrl = ALU_ADD;
        endcase
      end
      default: alu_ctrl = ALU_ADD;
    endcase
  end

endmodule
