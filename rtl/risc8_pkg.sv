// risc8_pkg: types and constants shared by the 8-bit RISC processor.
//
// The processor follows the MIPS organisation: 32-bit instruction words in
// R-type (opcode, rs, rt, rd, shamt, funct), I-type (opcode, rs, rt,
// immediate) and J-type (opcode, target) layouts, with an 8-bit datapath.
// Because data is 8 bits wide, the immediate operand is taken straight from
// instruction bits [7:0] and is not sign-extended.
//
// The nine control signals (RegDst, Jump, Branch, MemRead, MemtoReg, ALUOp,
// MemWrite, ALUSrc, RegWrite) are the ones the design names. The opcode and
// funct values, the ALU operation codes and the shifter and rotator functions
// are this design's own choice. Opcodes reuse the classic MIPS numbers; the
// shifter and rotator use free funct codes.
package risc8_pkg;

  localparam int INSTR_W = 32;
  localparam int REG_AW  = 5;

  // Primary opcodes, instruction bits [31:26].
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function codes, instruction bits [5:0].
  localparam logic [5:0] F_SHL  = 6'h00;  // universal shifter: shift left by one
  localparam logic [5:0] F_LOAD = 6'h01;  // universal shifter: parallel load (copy)
  localparam logic [5:0] F_SHR  = 6'h02;  // universal shifter: shift right by one
  localparam logic [5:0] F_ROL  = 6'h04;  // barrel rotator: rotate left by shamt
  localparam logic [5:0] F_ROR  = 6'h06;  // barrel rotator: rotate right by shamt
  localparam logic [5:0] F_ADD  = 6'h20;
  localparam logic [5:0] F_SUB  = 6'h22;
  localparam logic [5:0] F_AND  = 6'h24;
  localparam logic [5:0] F_OR   = 6'h25;
  localparam logic [5:0] F_XOR  = 6'h26;
  localparam logic [5:0] F_NOR  = 6'h27;
  localparam logic [5:0] F_SLT  = 6'h2A;

  // ALUOp from the main decoder to the ALU-control decoder.
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // loads, stores, addi: address / sum
    ALUOP_SUB   = 2'b01,   // beq: compare by subtraction
    ALUOP_FUNCT = 2'b10    // R-type: operation from the funct field
  } aluop_e;

  // Operation performed by the ALU.
  typedef enum logic [3:0] {
    ALU_AND = 4'b0000,
    ALU_OR  = 4'b0001,
    ALU_ADD = 4'b0010,
    ALU_XOR = 4'b0011,
    ALU_SUB = 4'b0110,
    ALU_SLT = 4'b0111,
    ALU_NOR = 4'b1100
  } alu_op_e;

  // Which execution unit produces the result.
  typedef enum logic [1:0] {
    EX_ALU   = 2'd0,
    EX_SHIFT = 2'd1,
    EX_ROT   = 2'd2
  } ex_sel_e;

  // Universal shifter control lines.
  typedef enum logic [1:0] {
    SH_LOAD  = 2'd0,
    SH_LEFT  = 2'd1,
    SH_RIGHT = 2'd2
  } shift_mode_e;

  // The nine control signals of the main decoder.
  // mem_to_reg = 1 selects the ALU/execute result, 0 the memory read data.
  typedef struct packed {
    logic   reg_dst;     // 1: write register is rd, 0: rt
    logic   jump;
    logic   branch;
    logic   mem_read;
    logic   mem_to_reg;
    aluop_e alu_op;
    logic   mem_write;
    logic   alu_src;     // 1: second operand is the immediate
    logic   reg_write;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{reg_dst: 1'b0, jump: 1'b0, branch: 1'b0,
                                 mem_read: 1'b0, mem_to_reg: 1'b0,
                                 alu_op: ALUOP_ADD, mem_write: 1'b0,
                                 alu_src: 1'b0, reg_write: 1'b0};

endpackage
