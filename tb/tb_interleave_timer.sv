// Self-checking testbench of interleave_timer: after reset the phase must
// count 0..23 and wrap, for several frames, and a reset in the middle of a
// frame must return it to 0 on the next cycle.
`timescale 1ns / 1ps
module tb_interleave_timer;
  localparam int unsigned N = 24;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [4:0] phase;
  int checks = 0, failures = 0;

  interleave_timer dut (.clk(clk), .rst(rst), .phase(phase));

  always #12.5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    #1;
    expected = 0;
    for (int i = 0; i < 3 * N + 5; i++) begin
      checks++;
      if (phase != 5'(expected)) begin
        failures++;
        $display("cycle %0d: phase %0d, expected %0d", i, phase, expected);
      end
      expected = (expected + 1) % N;
      @(posedge clk);
      #1;
    end
    // reset in mid-frame
    rst <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (phase != 0) begin failures++; $display("phase %0d after reset", phase); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
