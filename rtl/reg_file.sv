// reg_file: general-purpose register file.
//
// NREGS registers of W bits with two asynchronous read ports, one
// synchronous write port and a third read port for observation. Register 0
// always reads zero, as in MIPS. A read of the register being written in the
// same cycle returns the new value (write-through), so an instruction in
// decode sees the result of the instruction in write-back. The register count,
// the zero register, the write-through and the reset of all registers to zero
// are this design's choices.
//
// Interface: ra1/ra2 -> rd1/rd2 ("read register 1/2", "read data 1/2"),
// we/wa/wd ("RegWrite", "write register", "write data"), dbg_ra -> dbg_rd.
// Timing: writes on the rising edge; reads are combinational.
module reg_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic [AW-1:0] dbg_ra,
  output logic [W-1:0]  dbg_rd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [W-1:0] rd(input logic [AW-1:0] a);
    if (a == '0)             return '0;
    else if (we && a == wa)  return wd;
    else                     return regs[a];
  endfunction

  always_comb begin
    rd1    = rd(ra1);
    rd2    = rd(ra2);
    dbg_rd = (dbg_ra == '0) ? '0 : regs[dbg_ra];
  end

endmodule
