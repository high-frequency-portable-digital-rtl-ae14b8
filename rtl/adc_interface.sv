// Control and 8-bit parallel interface of one AD7822 converter.
//
// The converter runs in its standalone mode: its RD and CS pins are tied to
// its EOC output, so it drives its result on the data bus for as long as EOC
// is low. This block
//   * pulses convst_n low for one clk cycle whenever the shared frame phase
//     equals TRIGGER_PHASE (once per FRAME_CYCLES cycles), and
//   * registers eoc_n and the data bus, and keeps the bus value of the second
//     and later registered cycles in which EOC is low, so the stored result
//     is never taken from the cycle in which the bus turns on.
// sample holds the most recent result until the next conversion replaces it;
// done pulses for one cycle when a result has been captured (on the first
// cycle it is stored).
//
// Following the design: one trigger per 24-cycle frame per converter, with the
// two converters half a frame apart; the result is handed on by the mux near
// the end of the conversion's frame. This implementation's choices: the
// trigger pulse comes from a register so the pin cannot glitch, and the
// result is captured while EOC is low (which is when a standalone AD7822
// drives its bus) instead of at a fixed phase after EOC has risen again.
//
// Timing: convst_n is low in the cycle in which phase == TRIGGER_PHASE. A
// result present on the bus while eoc_n is low reaches sample three clk edges
// after eoc_n falls.
module adc_interface #(
  parameter int unsigned FRAME_CYCLES  = scope_pkg::FRAME_CYCLES,
  parameter int unsigned PHASE_W       = $clog2(FRAME_CYCLES),
  parameter int unsigned SAMPLE_W      = scope_pkg::SAMPLE_W,
  parameter int unsigned TRIGGER_PHASE = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [PHASE_W-1:0]  phase,
  // converter pins
  output logic                convst_n,
  input  logic                eoc_n,
  input  logic [SAMPLE_W-1:0] data,
  // captured result
  output logic [SAMPLE_W-1:0] sample,
  output logic                done
);
  // The phase one cycle before the trigger: the register then shows the
  // pulse exactly while phase == TRIGGER_PHASE.
  localparam logic [PHASE_W-1:0] PRE_PHASE =
      PHASE_W'((TRIGGER_PHASE + FRAME_CYCLES - 1) % FRAME_CYCLES);

  logic                eoc_q1, eoc_q2;
  logic [SAMPLE_W-1:0] data_q;
  logic                capture;

  always_ff @(posedge clk) begin
    if (rst) convst_n <= 1'b1;
    else     convst_n <= (phase != PRE_PHASE);
  end

  // Input registers on the asynchronous converter pins.
  always_ff @(posedge clk) begin
    if (rst) begin
      eoc_q1 <= 1'b1;
      eoc_q2 <= 1'b1;
      data_q <= '0;
    end else begin
      eoc_q1 <= eoc_n;
      eoc_q2 <= eoc_q1;
      data_q <= data;
    end
  end

  // Second and later registered cycles of EOC low: data_q was sampled while
  // the bus had already been driven for a full cycle.
  assign capture = !eoc_q1 && !eoc_q2;

  // done_seen marks that the current EOC pulse has already given a result,
  // so done is a single-cycle pulse per conversion.
  logic done_seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample    <= '0;
      done      <= 1'b0;
      done_seen <= 1'b0;
    end else begin
      if (capture) sample <= data_q;
      done      <= capture && !done_seen;
      done_seen <= capture;
    end
  end

  // The trigger pulse is exactly one cycle wide.
  a_single_pulse: assert property (@(posedge clk) disable iff (rst)
                                   !convst_n |=> convst_n);
endmodule
