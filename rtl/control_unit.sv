// control_unit: main instruction decoder.
//
// Reads the opcode (instruction bits [31:26]) and produces the nine control
// signals RegDst, Jump, Branch, MemRead, MemtoReg, ALUOp, MemWrite, ALUSrc and
// RegWrite, packed in a ctrl_t. It is the first of the two instruction
// decoders; the second, alu_control, refines ALUOp with the funct field.
// The signal set follows the design. The opcode values and the table below
// are this design's own. MemtoReg uses the design's mux numbering:
// 1 selects the execute result, 0 the memory read data. An unknown opcode
// decodes to a no-operation (no register or memory write, no redirect).
//
// Interface: opcode in, ctrl out. Purely combinational.
module control_unit
  import risc8_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = CTRL_NOP;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.alu_op     = ALUOP_FUNCT;
        ctrl.reg_write  = 1'b1;
      end
      OP_LW: begin
        ctrl.mem_read   = 1'b1;
        ctrl.mem_to_reg = 1'b0;
        ctrl.alu_op     = ALUOP_ADD;
        ctrl.alu_src    = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.mem_write  = 1'b1;
        ctrl.alu_op     = ALUOP_ADD;
        ctrl.alu_src    = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch     = 1'b1;
        ctrl.alu_op     = ALUOP_SUB;
      end
      OP_ADDI: begin
        ctrl.mem_to_reg = 1'b1;
        ctrl.alu_op     = ALUOP_ADD;
        ctrl.alu_src    = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_J: begin
        ctrl.jump       = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end

endmodule
