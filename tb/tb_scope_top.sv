// End-to-end testbench of scope_top at a reduced capture depth (512 words)
// and a 2.5 MHz SPI clock, with a ramp input so every conversion is
// distinguishable. Two complete captures are made: the second shows that a
// new start request re-arms the capture. See scope_tb_common.svh.
`timescale 1ns / 1ps
module tb_scope_top;
  localparam int unsigned DEPTH        = 512;
  localparam real         SCLK_HALF_NS = 200.0;
  localparam int          CAPTURES     = 2;
  localparam int          WAVE [CAPTURES] = '{0, 0};   // ramp, ramp
  localparam real         PEAK_V       = 0.0;

  `include "scope_tb_common.svh"

  scope_top #(.RAM_DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .convst1_n(convst1_n), .eoc1_n(eoc1_n), .data1(data1),
    .convst2_n(convst2_n), .eoc2_n(eoc2_n), .data2(data2), .sclk(sclk),
    .mosi(mosi), .starter(starter), .cs_n(cs_n), .miso(miso), .led(led));

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
