// FPGA logic of a low-cost two-ADC digital storage oscilloscope.
//
// Two 8-bit AD7822 converters sample the same conditioned input in turns
// (time interleaving): a modulo-24 phase counter on the 40 MHz clock
// triggers converter 1 at phase 0 and converter 2 at phase 12, so together
// they deliver one sample every 12 cycles, 3.33 Msps, with each converter
// running at half that rate. A registered mux forwards the converter whose
// result is complete, and the write controller stores the stream in a
// 16384 x 8 dual-clock RAM until it is full. The host (a small Linux board)
// reads the capture through an SPI slave clocked by the host's SPI clock
// sclk (500 kHz): one sample in the low byte of each 16-bit transfer.
//
// Clock domains: clk (sampling, write port) and sclk (SPI, read port). Two
// single-bit crossings use two-flop synchronizers: the start request from
// the host (sclk -> clk, clears the write address) and the RAM-full flag
// (clk -> sclk, lets the SPI slave read). The read address is in the sclk
// domain only.
//
// Capture sequence: raise starter (with sclk running) -> the write address
// clears and 16384 samples are written (4.9 ms) -> full -> 16384 SPI
// transfers with cs_n low for 16 sclk cycles each. led shows the current
// mux output, as the design brings it to a row of LEDs for debugging.
//
// rst is synchronous in both domains and must be held for at least three
// edges of each clock. The structure, phases and sizes follow the design;
// the capture of each converter's result while its EOC is low, the
// synchronizer resets and the held-off writes during a start request are
// this implementation's choices.
module scope_top #(
  parameter int unsigned FRAME_CYCLES = scope_pkg::FRAME_CYCLES,
  parameter int unsigned SAMPLE_W     = scope_pkg::SAMPLE_W,
  parameter int unsigned RAM_DEPTH    = scope_pkg::RAM_DEPTH,
  parameter int unsigned FRAME_BITS   = scope_pkg::SPI_FRAME_BITS
) (
  input  logic                clk,       // 40 MHz system clock
  input  logic                rst,
  // converter 1
  output logic                convst1_n,
  input  logic                eoc1_n,
  input  logic [SAMPLE_W-1:0] data1,
  // converter 2
  output logic                convst2_n,
  input  logic                eoc2_n,
  input  logic [SAMPLE_W-1:0] data2,
  // host SPI link
  input  logic                sclk,
  input  logic                mosi,
  input  logic                starter,
  input  logic                cs_n,
  output logic                miso,
  // debug LEDs
  output logic [SAMPLE_W-1:0] led
);
  localparam int unsigned PHASE_W = $clog2(FRAME_CYCLES);
  localparam int unsigned ADDR_W  = $clog2(RAM_DEPTH);

  logic [PHASE_W-1:0]  phase;
  logic [SAMPLE_W-1:0] sample1, sample2, mux_out, ram_q;
  logic                done1, done2, mux_sel;
  logic                start_sclk, start_clk;
  logic                full_clk, full_sclk;
  logic                wren;
  logic [ADDR_W-1:0]   waddr;
  logic [ADDR_W:0]     raddr;

  interleave_timer #(.FRAME_CYCLES(FRAME_CYCLES)) u_timer (
    .clk(clk), .rst(rst), .phase(phase));

  adc_interface #(.FRAME_CYCLES(FRAME_CYCLES), .SAMPLE_W(SAMPLE_W),
                  .TRIGGER_PHASE(0)) u_adc1 (
    .clk(clk), .rst(rst), .phase(phase),
    .convst_n(convst1_n), .eoc_n(eoc1_n), .data(data1),
    .sample(sample1), .done(done1));

  adc_interface #(.FRAME_CYCLES(FRAME_CYCLES), .SAMPLE_W(SAMPLE_W),
                  .TRIGGER_PHASE(FRAME_CYCLES / 2)) u_adc2 (
    .clk(clk), .rst(rst), .phase(phase),
    .convst_n(convst2_n), .eoc_n(eoc2_n), .data(data2),
    .sample(sample2), .done(done2));

  interleave_mux #(.FRAME_CYCLES(FRAME_CYCLES), .SAMPLE_W(SAMPLE_W)) u_mux (
    .clk(clk), .rst(rst), .phase(phase),
    .sample1(sample1), .sample2(sample2), .out(mux_out), .sel(mux_sel));

  sync2 u_start_sync (.dst_clk(clk), .rst(rst), .d(start_sclk), .q(start_clk));

  write_ctrl #(.FRAME_CYCLES(FRAME_CYCLES), .RAM_DEPTH(RAM_DEPTH)) u_wr (
    .clk(clk), .rst(rst), .restart(start_clk), .phase(phase),
    .waddr(waddr), .wren(wren), .full(full_clk));

  sample_ram #(.DEPTH(RAM_DEPTH), .WIDTH(SAMPLE_W)) u_ram (
    .wclk(clk), .we(wren), .waddr(waddr), .wdata(mux_out),
    .rclk(sclk), .raddr(raddr[ADDR_W-1:0]), .q(ram_q));

  sync2 u_full_sync (.dst_clk(sclk), .rst(rst), .d(full_clk), .q(full_sclk));

  spi_slave #(.SAMPLE_W(SAMPLE_W), .FRAME_BITS(FRAME_BITS),
              .RAM_DEPTH(RAM_DEPTH)) u_spi (
    .sclk(sclk), .rst(rst), .starter(starter), .cs_n(cs_n), .mosi(mosi),
    .miso(miso), .start(start_sclk), .ram_full(full_sclk),
    .raddr(raddr), .ram_q(ram_q));

  assign led = mux_out;

  // Status flags that only the testbench looks at.
  logic unused;
  assign unused = done1 ^ done2 ^ mux_sel ^ raddr[ADDR_W];
endmodule
