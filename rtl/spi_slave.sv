// SPI slave that streams the captured samples to the host (sclk domain).
//
// Start request: the host raises the starter pin to ask for a new capture.
// The pin is synchronized to sclk and its rising edge gives a one-cycle
// start pulse, which clears the read address here and (through a
// synchronizer in the top level) the RAM write address, re-arming the
// capture.
//
// Read-out: the host reads with 16-bit SPI transfers, chip select cs_n low
// for the whole transfer. A bit counter runs while cs_n is low. When it
// reaches FRAME_BITS - SAMPLE_W (8: the start of the second byte) and the RAM
// is full, the shift register loads the RAM word at the read address and the
// address steps on; otherwise the register shifts left by one, MSB first on
// miso. The host therefore finds one sample in the low byte of each transfer
// and reads the capture in order with RAM_DEPTH transfers. The read address
// stops at RAM_DEPTH (one past the last word). mosi is not used: the host's
// words carry no command.
//
// Following the design: starter-pin synchronizer and rising-edge detector,
// bit counter cleared by cs_n, load at bit 8 gated by the RAM-full flag, a
// saturating read counter. This implementation's choices: the shift register
// clears on reset and on a start request.
//
// Timing: all registers change on rising sclk edges. The bit loaded on the
// 9th rising edge of a transfer is valid on miso from that edge to the next,
// so the host samples miso on falling edges (the middle of each bit). The RAM
// has two sclk edges of read latency, less than one transfer, so the word for
// the new address is ready at the next load. The starter pin must be seen
// by at least three sclk edges while high and three while low.
module spi_slave #(
  parameter int unsigned SAMPLE_W   = scope_pkg::SAMPLE_W,
  parameter int unsigned FRAME_BITS = scope_pkg::SPI_FRAME_BITS,
  parameter int unsigned RAM_DEPTH  = scope_pkg::RAM_DEPTH,
  parameter int unsigned ADDR_W     = $clog2(RAM_DEPTH)
) (
  input  logic                sclk,
  input  logic                rst,
  // host pins
  input  logic                starter,
  input  logic                cs_n,
  input  logic                mosi,
  output logic                miso,
  // capture control
  output logic                start,
  input  logic                ram_full,   // synchronized to sclk
  // RAM read port
  output logic [ADDR_W:0]     raddr,
  input  logic [SAMPLE_W-1:0] ram_q
);
  localparam int unsigned CNT_W = $clog2(FRAME_BITS) + 1;
  localparam logic [CNT_W-1:0] LOAD_AT = CNT_W'(FRAME_BITS - SAMPLE_W);

  logic                starter_s, starter_d;
  logic [CNT_W-1:0]    bit_cnt;
  logic [SAMPLE_W-1:0] shreg;

  sync2 u_starter_sync (.dst_clk(sclk), .rst(rst), .d(starter), .q(starter_s));

  always_ff @(posedge sclk) begin
    if (rst) starter_d <= 1'b0;
    else     starter_d <= starter_s;
  end

  assign start = starter_s && !starter_d;

  always_ff @(posedge sclk) begin
    if (rst || cs_n) bit_cnt <= '0;
    else             bit_cnt <= bit_cnt + 1'b1;
  end

  always_ff @(posedge sclk) begin
    if (rst || start) begin
      raddr <= '0;
      shreg <= '0;
    end else if (bit_cnt == LOAD_AT && ram_full) begin
      shreg <= ram_q;
      if (!raddr[ADDR_W]) raddr <= raddr + 1'b1;
    end else begin
      shreg <= {shreg[SAMPLE_W-2:0], 1'b0};
    end
  end

  assign miso = shreg[SAMPLE_W-1];

  // The read address never passes one past the last word.
  a_raddr_range: assert property (@(posedge sclk) disable iff (rst)
                                  raddr <= (ADDR_W+1)'(RAM_DEPTH));

  // mosi carries nothing the slave needs.
  logic unused_mosi;
  assign unused_mosi = mosi;
endmodule
