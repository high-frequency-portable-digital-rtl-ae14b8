// Full-size testbench of scope_top at its default parameters: one complete
// capture of 16384 samples of a 100 kHz, 5 Vpp sine (through the front-end
// scaling) at 3.33 Msps on a 40 MHz clock, read out over a 500 kHz SPI
// clock as the host does. Besides the common checks (see
// scope_tb_common.svh) the captured codes must span the expected amplitude
// and show one period per 33.3 samples.
`timescale 1ns / 1ps
module tb_scope_full;
  localparam int unsigned DEPTH        = 16384;
  localparam real         SCLK_HALF_NS = 1000.0;
  localparam int          CAPTURES     = 1;
  localparam int          WAVE [CAPTURES] = '{1};      // sine
  localparam real         PEAK_V       = 2.5;          // 5 Vpp

  `include "scope_tb_common.svh"

  scope_top dut (
    .clk(clk), .rst(rst), .convst1_n(convst1_n), .eoc1_n(eoc1_n), .data1(data1),
    .convst2_n(convst2_n), .eoc2_n(eoc2_n), .data2(data2), .sclk(sclk),
    .mosi(mosi), .starter(starter), .cs_n(cs_n), .miso(miso), .led(led));

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
