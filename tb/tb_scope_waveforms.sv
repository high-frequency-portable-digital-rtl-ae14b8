// Testbench of scope_top at its default parameters with the three inputs of
// the scope's own demonstration: 100 kHz sine, square and sawtooth waves of
// 2.5 Vpp without offset, one full 16384-sample capture each, read out over
// the 500 kHz SPI clock. Each capture must be consecutive conversions of the
// input, span the expected codes and show 100 kHz (one period per 33.3
// samples); the square wave must show only its two levels and the sawtooth
// one fall per period. See scope_tb_common.svh.
`timescale 1ns / 1ps
module tb_scope_waveforms;
  localparam int unsigned DEPTH        = 16384;
  localparam real         SCLK_HALF_NS = 1000.0;
  localparam int          CAPTURES     = 3;
  localparam int          WAVE [CAPTURES] = '{1, 2, 3}; // sine, square, sawtooth
  localparam real         PEAK_V       = 1.25;          // 2.5 Vpp

  `include "scope_tb_common.svh"

  scope_top dut (
    .clk(clk), .rst(rst), .convst1_n(convst1_n), .eoc1_n(eoc1_n), .data1(data1),
    .convst2_n(convst2_n), .eoc2_n(eoc2_n), .data2(data2), .sclk(sclk),
    .mosi(mosi), .starter(starter), .cs_n(cs_n), .miso(miso), .led(led));

  initial begin
    #3s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
