// instr_mem: instruction memory of the processor.
//
// WORDS words of INSTR_W bits. The fetch side reads asynchronously by word
// address (the PC is a byte address; the fetch unit drops its two low bits).
// A synchronous write port loads the program before or while the processor
// runs; this loading port is this design's choice, as the design does not
// say how the program gets into the memory.
//
// Interface: clk; we/waddr/wdata write one word on the rising edge;
// raddr/rdata read one word in the same cycle.
module instr_mem #(
  parameter int unsigned WORDS   = 64,
  parameter int unsigned INSTR_W = 32,
  localparam int unsigned AW     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [INSTR_W-1:0] wdata,
  input  logic [AW-1:0]      raddr,
  output logic [INSTR_W-1:0] rdata
);
  logic [INSTR_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
