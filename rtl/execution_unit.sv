// execution_unit: execute stage datapath.
//
// The ALUSrc multiplexer picks the second operand (0: read data 2, 1: the
// immediate). The ALU-control decoder turns ALUOp and funct into control
// lines for the ALU, the universal shifter and the barrel rotator, and a
// result multiplexer passes on the output of the unit that was selected.
// A separate adder forms the branch target PC+4 + (immediate << 2), the
// immediate taken as a signed word offset; the jump target is the J-type
// target field shifted left by two, cut to the PC width. The ALUSrc
// numbering, the ALU-control block and the branch adder follow the design;
// the result multiplexer and the jump target format are this design's own.
//
// Interface: operands a (register A) and b (register B) already forwarded;
// result, zero, branch_target and jump_target out. Purely combinational.
module execution_unit
  import risc8_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned PC_W = 8
) (
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  input  logic [W-1:0]    imm,
  input  logic [4:0]      shamt,
  input  logic [5:0]      funct,
  input  logic [25:0]     target,
  input  aluop_e          alu_op,
  input  logic            alu_src,
  input  logic [PC_W-1:0] pc_plus4,
  output logic [W-1:0]    result,
  output logic            zero,
  output ex_sel_e         ex_sel,
  output logic [PC_W-1:0] branch_target,
  output logic [PC_W-1:0] jump_target
);
  alu_op_e      alu_ctrl;
  shift_mode_e  shift_mode;
  logic         rot_left;
  logic [W-1:0] b_mux, alu_y, sh_y, rot_y;

  assign b_mux = alu_src ? imm : b;

  alu_control u_aluc (
    .alu_op    (alu_op),
    .funct     (funct),
    .alu_ctrl  (alu_ctrl),
    .ex_sel    (ex_sel),
    .shift_mode(shift_mode),
    .rot_left  (rot_left)
  );

  alu #(.W(W)) u_alu (
    .a   (a),
    .b   (b_mux),
    .op  (alu_ctrl),
    .y   (alu_y),
    .zero(zero)
  );

  universal_shifter #(.W(W)) u_shift (
    .a   (a),
    .mode(shift_mode),
    .y   (sh_y)
  );

  barrel_rotator #(.W(W)) u_rot (
    .a     (a),
    .amount(shamt[$clog2(W)-1:0]),
    .left  (rot_left),
    .y     (rot_y)
  );

  always_comb begin
    case (ex_sel)
      EX_SHIFT: result = sh_y;
      EX_ROT:   result = rot_y;
      default:  result = alu_y;
    endcase
  end

  // Branch adder: sign-extended immediate, shifted left by two.
  logic [PC_W-1:0] offs;
  assign offs          = PC_W'($signed(imm)) << 2;
  assign branch_target = pc_plus4 + offs;
  assign jump_target   = {target[PC_W-3:0], 2'b00};

endmodule
