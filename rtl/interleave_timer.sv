// Interleave phase counter.
//
// A free-running counter that steps 0, 1, ..., FRAME_CYCLES-1, 0, ... on every
// rising clk edge. Its value is the phase of the sampling frame: the two ADC
// interfaces trigger their converter at phase 0 and FRAME_CYCLES/2, the mux
// and the RAM write controller act on fixed phases of the same count. The
// 24-cycle frame with a trigger every 12 cycles follows the design; a
// synchronous active-high reset to phase 0 is this implementation's choice.
//
// Timing: phase is a register; it is 0 in the cycle after reset is released.
module interleave_timer #(
  parameter int unsigned FRAME_CYCLES = scope_pkg::FRAME_CYCLES,
  parameter int unsigned PHASE_W      = $clog2(FRAME_CYCLES)
) (
  input  logic               clk,
  input  logic               rst,
  output logic [PHASE_W-1:0] phase
);
  localparam logic [PHASE_W-1:0] LAST = PHASE_W'(FRAME_CYCLES - 1);

  always_ff @(posedge clk) begin
    if (rst || phase == LAST) phase <= '0;
    else                      phase <= phase + 1'b1;
  end

  // The counter never leaves its range once it has been reset.
  a_phase_range: assert property (@(posedge clk) disable iff (rst) phase <= LAST);
endmodule
