// fetch_unit: instruction fetch stage.
//
// Holds the program counter, a byte address. Each clock the PC moves to the
// next-PC multiplexer's output: input 0 is PC+4 from the incrementing adder,
// input 1 is the redirect target (the "add result" of a taken branch, or a
// jump target). The instruction at the current PC is read from the
// instruction memory by word address PC[PC_W-1:2]. The adder constant 4 and
// the mux input numbering follow the design; the PC width and the reset value
// of zero are this design's choice.
//
// Interface: redirect selects mux input 1 for the next PC. prog_* load the
// instruction memory. pc, pc_plus4 and instr are valid in the same cycle.
// Timing: the PC updates on each rising edge; reset loads PC = 0.
module fetch_unit
  import risc8_pkg::*;
#(
  parameter int unsigned PC_W = 8,
  localparam int unsigned IAW = PC_W - 2
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               redirect,
  input  logic [PC_W-1:0]    redirect_target,
  input  logic               prog_we,
  input  logic [IAW-1:0]     prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  output logic [PC_W-1:0]    pc,
  output logic [PC_W-1:0]    pc_plus4,
  output logic [INSTR_W-1:0] instr
);
  logic [PC_W-1:0] next_pc;

  assign pc_plus4 = pc + PC_W'(4);
  assign next_pc  = redirect ? redirect_target : pc_plus4;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= next_pc;
  end

  instr_mem #(.WORDS(2 ** IAW), .INSTR_W(INSTR_W)) u_imem (
    .clk  (clk),
    .we   (prog_we),
    .waddr(prog_addr),
    .wdata(prog_data),
    .raddr(pc[PC_W-1:2]),
    .rdata(instr)
  );

endmodule
