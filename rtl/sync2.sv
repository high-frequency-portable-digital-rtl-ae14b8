// Two-flop synchronizer for a single-bit level crossing into the dst_clk
// domain. The output follows the input two dst_clk edges later. It is used
// for the start request (SPI clock to system clock) and for the RAM-full flag
// (system clock to SPI clock). Both flops clear on rst.
module sync2 (
  input  logic dst_clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge dst_clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
