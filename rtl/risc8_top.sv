// risc8_top: 8-bit RISC processor with a four-stage pipeline.
//
// Stages: instruction fetch (IF), instruction decode (ID), execute (EX) and
// write back (WB), with a pipeline register between each pair. IF reads the
// instruction at the PC; ID decodes it, reads the register file and picks the
// destination register; EX runs the ALU, the universal shifter or the barrel
// rotator, accesses the data memory (the ALU result is the address) and
// resolves branches and jumps; WB writes the execute result or the loaded
// byte back to the register file. The four stages, the separate instruction
// and data memories and the block boundaries follow the design.
//
// The hazard handling is this design's own:
//  - forwarding: an instruction in EX that reads the register written by
//    the instruction in WB takes the WB value (the "bypass");
//  - the register file is write-through, so ID sees the WB result too;
//  - because memory is accessed in EX, a load's result is forwarded like any
//    other, and no stall is ever needed;
//  - a taken branch (Branch and Zero) or a jump is resolved in EX; the two
//    younger instructions in IF/ID and ID/EX are squashed (flush), so a taken
//    redirect costs two cycles. Every other instruction completes at one per
//    clock.
// The four-phase timing generator runs beside the pipeline and its phases
// t1..t4 are brought out on `phase`.
//
// Interface: clk, rst (synchronous, active high). prog_* write instruction
// words into the instruction memory (hold the core in reset while loading).
// The wb_* outputs trace every instruction as it retires. dbg_* and
// dmem_dbg_* read a register or a data byte without disturbing the core.
// Timing: an instruction fetched in cycle n writes back at the end of
// cycle n+3.
module risc8_top
  import risc8_pkg::*;
#(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned PC_W       = 8,
  parameter int unsigned NREGS      = 32,
  parameter int unsigned DMEM_WORDS = 256,
  localparam int unsigned DAW       = $clog2(DMEM_WORDS)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               prog_we,
  input  logic [PC_W-3:0]    prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  output logic [3:0]         phase,
  output logic [PC_W-1:0]    pc,
  output logic               wb_valid,
  output logic               wb_we,
  output logic [REG_AW-1:0]  wb_reg,
  output logic [DATA_W-1:0]  wb_data,
  input  logic [REG_AW-1:0]  dbg_raddr,
  output logic [DATA_W-1:0]  dbg_rdata,
  input  logic [DAW-1:0]     dmem_dbg_addr,
  output logic [DATA_W-1:0]  dmem_dbg_data
);
  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic               valid;
    logic [INSTR_W-1:0] instr;
    logic [PC_W-1:0]    pc_plus4;
  } if_id_t;

  typedef struct packed {
    logic               valid;
    ctrl_t              ctrl;
    logic [REG_AW-1:0]  rs;
    logic [REG_AW-1:0]  rt;
    logic [REG_AW-1:0]  dest;
    logic [DATA_W-1:0]  rd1;
    logic [DATA_W-1:0]  rd2;
    logic [DATA_W-1:0]  imm;
    logic [4:0]         shamt;
    logic [5:0]         funct;
    logic [25:0]        target;
    logic [PC_W-1:0]    pc_plus4;
  } id_ex_t;

  typedef struct packed {
    logic               valid;
    logic               reg_write;
    logic               mem_to_reg;
    logic [REG_AW-1:0]  dest;
    logic [DATA_W-1:0]  result;
    logic [DATA_W-1:0]  read_data;
  } ex_wb_t;

  if_id_t if_id;
  id_ex_t id_ex;
  ex_wb_t ex_wb;

  // --------------------------------------------------------------- timing
  timing_gen u_tgen (
    .clk(clk),
    .rst(rst),
    .t  (phase)
  );

  // ------------------------------------------------------------------ IF
  logic               redirect;
  logic [PC_W-1:0]    redirect_target;
  logic [PC_W-1:0]    if_pc_plus4;
  logic [INSTR_W-1:0] if_instr;

  fetch_unit #(.PC_W(PC_W)) u_fetch (
    .clk            (clk),
    .rst            (rst),
    .redirect       (redirect),
    .redirect_target(redirect_target),
    .prog_we        (prog_we),
    .prog_addr      (prog_addr),
    .prog_data      (prog_data),
    .pc             (pc),
    .pc_plus4       (if_pc_plus4),
    .instr          (if_instr)
  );

  // ------------------------------------------------------------------ ID
  ctrl_t              id_ctrl;
  logic [5:0]         id_opcode, id_funct;
  logic [REG_AW-1:0]  id_rs, id_rt, id_dest;
  logic [4:0]         id_shamt;
  logic [DATA_W-1:0]  id_imm, id_rd1, id_rd2;
  logic [25:0]        id_target;
  logic [DATA_W-1:0]  wb_write_data;
  logic               wb_reg_write;

  control_unit u_ctrl (
    .opcode(id_opcode),
    .ctrl  (id_ctrl)
  );

  assign wb_reg_write = ex_wb.valid && ex_wb.reg_write;

  decode_unit #(.NREGS(NREGS), .W(DATA_W)) u_decode (
    .clk          (clk),
    .rst          (rst),
    .instr        (if_id.instr),
    .reg_dst      (id_ctrl.reg_dst),
    .wb_reg_write (wb_reg_write),
    .wb_mem_to_reg(ex_wb.mem_to_reg),
    .wb_write_reg (ex_wb.dest),
    .wb_result    (ex_wb.result),
    .wb_read_data (ex_wb.read_data),
    .wb_write_data(wb_write_data),
    .opcode       (id_opcode),
    .rs           (id_rs),
    .rt           (id_rt),
    .dest_reg     (id_dest),
    .shamt        (id_shamt),
    .funct        (id_funct),
    .imm          (id_imm),
    .target       (id_target),
    .read_data1   (id_rd1),
    .read_data2   (id_rd2),
    .dbg_ra       (dbg_raddr),
    .dbg_rd       (dbg_rdata)
  );

  // ------------------------------------------------------------------ EX
  logic              fwd_a, fwd_b;
  logic [DATA_W-1:0] ex_a, ex_b, ex_result, ex_read_data;
  logic              ex_zero;
  ex_sel_e           ex_sel;
  logic [PC_W-1:0]   ex_branch_target, ex_jump_target;
  logic              ex_take_branch, ex_take_jump;

  // Bypass from WB to EX.
  assign fwd_a = wb_reg_write && ex_wb.dest != '0 && ex_wb.dest == id_ex.rs;
  assign fwd_b = wb_reg_write && ex_wb.dest != '0 && ex_wb.dest == id_ex.rt;
  assign ex_a  = fwd_a ? wb_write_data : id_ex.rd1;
  assign ex_b  = fwd_b ? wb_write_data : id_ex.rd2;

  execution_unit #(.W(DATA_W), .PC_W(PC_W)) u_exec (
    .a            (ex_a),
    .b            (ex_b),
    .imm          (id_ex.imm),
    .shamt        (id_ex.shamt),
    .funct        (id_ex.funct),
    .target       (id_ex.target),
    .alu_op       (id_ex.ctrl.alu_op),
    .alu_src      (id_ex.ctrl.alu_src),
    .pc_plus4     (id_ex.pc_plus4),
    .result       (ex_result),
    .zero         (ex_zero),
    .ex_sel       (ex_sel),
    .branch_target(ex_branch_target),
    .jump_target  (ex_jump_target)
  );

  data_memory #(.WORDS(DMEM_WORDS), .W(DATA_W)) u_dmem (
    .clk      (clk),
    .mem_read (id_ex.valid && id_ex.ctrl.mem_read),
    .mem_write(id_ex.valid && id_ex.ctrl.mem_write),
    .addr     (ex_result[DAW-1:0]),
    .wdata    (ex_b),
    .rdata    (ex_read_data),
    .dbg_addr (dmem_dbg_addr),
    .dbg_data (dmem_dbg_data)
  );

  assign ex_take_branch  = id_ex.valid && id_ex.ctrl.branch && ex_zero;
  assign ex_take_jump    = id_ex.valid && id_ex.ctrl.jump;
  assign redirect        = ex_take_branch || ex_take_jump;
  assign redirect_target = ex_take_jump ? ex_jump_target : ex_branch_target;

  // ----------------------------------------------------- pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      if_id <= '0;
      id_ex <= '0;
      ex_wb <= '0;
    end else begin
      // IF/ID
      if_id.valid    <= !redirect;
      if_id.instr    <= if_instr;
      if_id.pc_plus4 <= if_pc_plus4;
      // ID/EX
      id_ex.valid    <= if_id.valid && !redirect;
      id_ex.ctrl     <= id_ctrl;
      id_ex.rs       <= id_rs;
      id_ex.rt       <= id_rt;
      id_ex.dest     <= id_dest;
      id_ex.rd1      <= id_rd1;
      id_ex.rd2      <= id_rd2;
      id_ex.imm      <= id_imm;
      id_ex.shamt    <= id_shamt;
      id_ex.funct    <= id_funct;
      id_ex.target   <= id_target;
      id_ex.pc_plus4 <= if_id.pc_plus4;
      // EX/WB
      ex_wb.valid      <= id_ex.valid;
      ex_wb.reg_write  <= id_ex.ctrl.reg_write;
      ex_wb.mem_to_reg <= id_ex.ctrl.mem_to_reg;
      ex_wb.dest       <= id_ex.dest;
      ex_wb.result     <= ex_result;
      ex_wb.read_data  <= ex_read_data;
    end
  end

  // ------------------------------------------------------------- outputs
  assign wb_valid = ex_wb.valid;
  assign wb_we    = wb_reg_write;
  assign wb_reg   = ex_wb.dest;
  assign wb_data  = wb_write_data;

  // A store and a load never happen together.
  a_mem_excl: assert property (@(posedge clk) disable iff (rst)
    !(id_ex.valid && id_ex.ctrl.mem_read && id_ex.ctrl.mem_write));

endmodule
