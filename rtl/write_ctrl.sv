// RAM write controller of the capture memory (system clock domain).
//
// A write address counter one bit wider than the RAM address. A sample is
// written in each of the two cycles of the frame that follow a mux update
// (phase 0 and phase FRAME_CYCLES/2), i.e. once per interleaved sample. When
// the counter reaches RAM_DEPTH its top bit, full, is set and writing stops,
// so one capture is exactly RAM_DEPTH consecutive samples. restart (the start
// request of the host, already synchronized to clk) clears the counter and
// arms a new capture; while it is high nothing is written.
//
// Following the design: the write phases, the stop at a full RAM, clearing
// on reset or start request, and the full flag taken from the counter's top
// bit. Holding off writes while restart is high is this implementation's
// choice.
//
// Timing: waddr/wren/full are valid in the same cycle; the RAM stores wdata
// at the clk edge that ends a cycle with wren high. A full capture takes
// RAM_DEPTH * FRAME_CYCLES / 2 clk cycles (196,608 cycles, 4.9 ms at 40 MHz).
module write_ctrl #(
  parameter int unsigned FRAME_CYCLES = scope_pkg::FRAME_CYCLES,
  parameter int unsigned PHASE_W      = $clog2(FRAME_CYCLES),
  parameter int unsigned RAM_DEPTH    = scope_pkg::RAM_DEPTH,
  parameter int unsigned ADDR_W       = $clog2(RAM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              restart,
  input  logic [PHASE_W-1:0] phase,
  output logic [ADDR_W-1:0] waddr,
  output logic              wren,
  output logic              full
);
  localparam logic [PHASE_W-1:0] WR1_PHASE = '0;
  localparam logic [PHASE_W-1:0] WR2_PHASE = PHASE_W'(FRAME_CYCLES / 2);

  logic [ADDR_W:0] count;

  assign waddr = count[ADDR_W-1:0];
  assign full  = count[ADDR_W];
  assign wren  = !full && !restart && (phase == WR1_PHASE || phase == WR2_PHASE);

  always_ff @(posedge clk) begin
    if (rst || restart) count <= '0;
    else if (wren)      count <= count + 1'b1;
  end

  // Once full, the counter holds until a new capture is requested.
  a_hold_when_full: assert property (@(posedge clk) disable iff (rst)
                                     full && !restart |=> full);
endmodule
