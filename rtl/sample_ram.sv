// Simple dual-port capture RAM with independent write and read clocks.
//
// DEPTH words of WIDTH bits. Port A writes on wclk (the 40 MHz sampling
// clock); port B reads on rclk (the host's SPI clock), so the sampler never
// has to wait for the slow host link. The read port registers its address and
// its output, as the FPGA block RAM of the design is configured, which gives
// a read latency of two rclk edges: an address presented before edge n
// appears on q after edge n+1. The memory powers up cleared; the two read
// registers have no reset and hold whatever the first two rclk edges give. Written as an
// array so that synthesis maps it onto block RAM; the size and the two
// registered read stages follow the design, the array style is this
// implementation's.
module sample_ram #(
  parameter int unsigned DEPTH  = scope_pkg::RAM_DEPTH,
  parameter int unsigned WIDTH  = scope_pkg::SAMPLE_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  // write port
  input  logic              wclk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  // read port
  input  logic              rclk,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  q
);
  logic [WIDTH-1:0]  mem [DEPTH];
  logic [ADDR_W-1:0] raddr_q;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    raddr_q <= raddr;
    q       <= mem[raddr_q];
  end
endmodule
