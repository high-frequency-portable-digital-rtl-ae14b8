// Registered 2:1 interleaving mux.
//
// The two converters take turns: converter 1 is triggered at phase 0 and
// converter 2 half a frame later. Just before a converter is triggered again,
// the result of its previous conversion is complete and stable, so at phase
// TAKE1_PHASE (one cycle before converter 1's trigger) the register takes
// sample1 and at phase TAKE2_PHASE (one cycle before converter 2's trigger) it
// takes sample2. Between those phases the output holds, giving one stream of
// samples that changes every FRAME_CYCLES/2 cycles, in time order.
//
// The selection phases follow the design (phase 23 and 11 of the 24-cycle
// frame). sel shows which converter the held value came from (0: converter 1);
// that flag and the reset value of 0 are this implementation's additions.
//
// Timing: out changes on the clk edge at the end of the cycle with
// phase == TAKE1_PHASE or TAKE2_PHASE, so it is valid from phase 0 and phase
// FRAME_CYCLES/2 onward.
module interleave_mux #(
  parameter int unsigned FRAME_CYCLES = scope_pkg::FRAME_CYCLES,
  parameter int unsigned PHASE_W      = $clog2(FRAME_CYCLES),
  parameter int unsigned SAMPLE_W     = scope_pkg::SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [PHASE_W-1:0]  phase,
  input  logic [SAMPLE_W-1:0] sample1,
  input  logic [SAMPLE_W-1:0] sample2,
  output logic [SAMPLE_W-1:0] out,
  output logic                sel
);
  localparam logic [PHASE_W-1:0] TAKE1_PHASE = PHASE_W'(FRAME_CYCLES - 1);
  localparam logic [PHASE_W-1:0] TAKE2_PHASE = PHASE_W'(FRAME_CYCLES / 2 - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      out <= '0;
      sel <= 1'b0;
    end else if (phase == TAKE1_PHASE) begin
      out <= sample1;
      sel <= 1'b0;
    end else if (phase == TAKE2_PHASE) begin
      out <= sample2;
      sel <= 1'b1;
    end
  end
endmodule
