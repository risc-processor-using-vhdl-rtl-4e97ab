// data_memory: data memory of the processor.
//
// WORDS bytes addressed by the execute result. MemRead enables the read data
// output (it reads zero otherwise); MemWrite stores the write data (the
// second register operand) on the rising edge. The ports follow the design;
// the size, the combinational read and the observation port are this
// design's choice.
//
// Interface: clk; addr, wdata, mem_read, mem_write; rdata. dbg_addr/dbg_data
// read any byte for observation.
// Timing: read is combinational, write is on the rising edge.
module data_memory #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          mem_read,
  input  logic          mem_write,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [W-1:0]  dbg_data
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr] <= wdata;
  end

  assign rdata    = mem_read ? mem[addr] : '0;
  assign dbg_data = mem[dbg_addr];

endmodule
