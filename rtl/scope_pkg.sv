// Shared constants of the two-ADC interleaved capture logic.
//
// The sampling frame is FRAME_CYCLES system-clock cycles long. ADC 1 is
// triggered at phase 0 and ADC 2 half a frame later, so the combined sample
// rate is clk / (FRAME_CYCLES / 2): 40 MHz / 12 = 3.33 Msps with the default
// 24-cycle frame. The capture memory holds RAM_DEPTH samples of SAMPLE_W bits,
// and every SPI transfer is SPI_FRAME_BITS long with the sample in its last
// SAMPLE_W bits.
package scope_pkg;
  localparam int unsigned FRAME_CYCLES   = 24;     // clk cycles between two triggers of one ADC
  localparam int unsigned SAMPLE_W       = 8;      // ADC resolution
  localparam int unsigned RAM_DEPTH      = 16384;  // capture depth in samples
  localparam int unsigned SPI_FRAME_BITS = 16;     // bits per SPI transfer from the host

endpackage
