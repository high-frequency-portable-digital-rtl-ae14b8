// Behavioural model of one AD7822 8-bit converter in standalone mode, for
// testbenches only (not synthesizable).
//
// A falling edge on convst_n starts a conversion: the input code is sampled
// SAMPLE_DELAY_NS later (track and hold), eoc_n goes low CONV_NS after the
// falling edge and stays low for EOC_NS. With RD and CS tied to EOC, the
// data bus carries the result only while eoc_n is low; at other times the
// model drives IDLE_CODE, the value a released bus with pull-ups would read.
// The defaults (400 ns to EOC, 100 ns EOC pulse) fit within the 24-cycle,
// 600 ns trigger spacing at 40 MHz. conversions counts started conversions.
`timescale 1ns / 1ps
module ad7822_model #(
  parameter int unsigned CONV_NS         = 400,
  parameter int unsigned EOC_NS          = 100,
  parameter int unsigned SAMPLE_DELAY_NS = 2,
  parameter logic [7:0]  IDLE_CODE       = 8'hFF
) (
  input  logic       convst_n,
  input  logic [7:0] vin_code,
  output logic       eoc_n,
  output logic [7:0] data,
  output int         conversions
);
  logic [7:0] held;

  initial begin
    eoc_n       = 1'b1;
    data        = IDLE_CODE;
    held        = '0;
    conversions = 0;
  end

  always @(negedge convst_n) begin
    conversions++;
    #(SAMPLE_DELAY_NS);
    held = vin_code;
    #(CONV_NS - SAMPLE_DELAY_NS);
    eoc_n = 1'b0;
    data  = held;
    #(EOC_NS);
    eoc_n = 1'b1;
    data  = IDLE_CODE;
  end
endmodule
