// timing_gen: four-phase timing generator.
//
// Produces the four non-overlapping phases t1..t4 that divide an instruction
// cycle into four quarters, one phase high at a time, in the order
// t1, t2, t3, t4, t1, ... The phase names come from the design's timing
// waveform. How many clocks each phase lasts is this design's choice: each
// phase lasts PHASE_CLKS clocks (default one).
//
// Interface: clk, rst (synchronous, active high) and t[3:0], where t[0] is t1.
// Timing: during reset and in the first PHASE_CLKS clocks after it, t1 is high;
// the phase then advances every PHASE_CLKS rising edges.
module timing_gen #(
  parameter int unsigned PHASE_CLKS = 1
) (
  input  logic       clk,
  input  logic       rst,
  output logic [3:0] t
);
  localparam int unsigned CW = (PHASE_CLKS > 1) ? $clog2(PHASE_CLKS) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      t   <= 4'b0001;
      cnt <= '0;
    end else if (cnt == CW'(PHASE_CLKS - 1)) begin
      t   <= {t[2:0], t[3]};
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
