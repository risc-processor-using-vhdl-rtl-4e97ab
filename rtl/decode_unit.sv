// decode_unit: instruction decode stage with the register file.
//
// Splits the instruction into its fields, reads the two source registers
// (rs into read data 1, rt into read data 2) and picks the destination
// register with the RegDst multiplexer (0: rt, 1: rd). The immediate operand
// is instruction bits [7:0], used as it is instead of being sign-extended,
// since data is 8 bits wide. The register file's write port is driven from
// the write-back stage through the MemtoReg multiplexer (1: execute result,
// 0: memory read data). These multiplexers and their input numbering follow
// the design; the field positions are the MIPS ones.
//
// Interface: instr and reg_dst from the decode stage; wb_* from the
// write-back stage. Outputs are combinational; the register write happens on
// the rising edge.
module decode_unit
  import risc8_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [INSTR_W-1:0] instr,
  input  logic               reg_dst,
  input  logic               wb_reg_write,
  input  logic               wb_mem_to_reg,
  input  logic [REG_AW-1:0]  wb_write_reg,
  input  logic [W-1:0]       wb_result,
  input  logic [W-1:0]       wb_read_data,
  output logic [W-1:0]       wb_write_data,
  output logic [5:0]         opcode,
  output logic [REG_AW-1:0]  rs,
  output logic [REG_AW-1:0]  rt,
  output logic [REG_AW-1:0]  dest_reg,
  output logic [4:0]         shamt,
  output logic [5:0]         funct,
  output logic [W-1:0]       imm,
  output logic [25:0]        target,
  output logic [W-1:0]       read_data1,
  output logic [W-1:0]       read_data2,
  input  logic [REG_AW-1:0]  dbg_ra,
  output logic [W-1:0]       dbg_rd
);
  logic [REG_AW-1:0] rd;

  assign opcode = instr[31:26];
  assign rs     = instr[25:21];
  assign rt     = instr[20:16];
  assign rd     = instr[15:11];
  assign shamt  = instr[10:6];
  assign funct  = instr[5:0];
  assign imm    = instr[W-1:0];
  assign target = instr[25:0];

  // RegDst multiplexer.
  assign dest_reg = reg_dst ? rd : rt;

  // MemtoReg multiplexer.
  assign wb_write_data = wb_mem_to_reg ? wb_result : wb_read_data;

  reg_file #(.NREGS(NREGS), .W(W)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .ra1   (rs[$clog2(NREGS)-1:0]),
    .ra2   (rt[$clog2(NREGS)-1:0]),
    .rd1   (read_data1),
    .rd2   (read_data2),
    .we    (wb_reg_write),
    .wa    (wb_write_reg[$clog2(NREGS)-1:0]),
    .wd    (wb_write_data),
    .dbg_ra(dbg_ra[$clog2(NREGS)-1:0]),
    .dbg_rd(dbg_rd)
  );

endmodule
