// barrel_rotator: rotates a W-bit word by N places in one step.
//
// The input comes from source register A; N comes from the instruction
// (the shamt field) and the direction from the decoder. A log2(W)-stage
// barrel network rotates by 1, 2, 4, ... places per stage. The rotate by N
// follows the design; the direction control and taking N from shamt are this
// design's choices.
//
// Interface: a, amount, left in; y out. Purely combinational.
module barrel_rotator #(
  parameter int unsigned W  = 8,
  localparam int unsigned SW = $clog2(W)
) (
  input  logic [W-1:0]  a,
  input  logic [SW-1:0] amount,
  input  logic          left,
  output logic [W-1:0]  y
);
  logic [W-1:0] stage [SW+1];

  // A right rotation by N is a left rotation by W-N.
  logic [SW-1:0] lamt;
  assign lamt = left ? amount : SW'(W - int'(amount));

  assign stage[0] = a;
  for (genvar s = 0; s < SW; s++) begin : g_stage
    localparam int unsigned D = 2 ** s;
    assign stage[s+1] = lamt[s] ? {stage[s][W-1-D:0], stage[s][W-1:W-D]} : stage[s];
  end

  assign y = stage[SW];

endmodule
