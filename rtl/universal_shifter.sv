// universal_shifter: load / shift-left / shift-right unit.
//
// Takes its input from source register A and, under the control lines from
// the decoder, either passes it through unchanged (load) or shifts it one
// place left or right, filling with zero. The result goes to the destination
// register. The three functions follow the design; the one-place shift
// distance and the zero fill are this design's choice.
//
// Interface: a, mode in; y out. Purely combinational.
module universal_shifter
  import risc8_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  shift_mode_e  mode,
  output logic [W-1:0] y
);
  always_comb begin
    case (mode)
      SH_LEFT:  y = {a[W-2:0], 1'b0};
      SH_RIGHT: y = {1'b0, a[W-1:1]};
      default:  y = a;
    endcase
  end

endmodule
