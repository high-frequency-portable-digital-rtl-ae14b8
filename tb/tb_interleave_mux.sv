// Self-checking testbench of interleave_mux: a reference phase counter and
// changing inputs; the output must take sample1 only at the end of phase 23,
// sample2 only at the end of phase 11, and hold otherwise.
`timescale 1ns / 1ps
module tb_interleave_mux;
  localparam int unsigned N = 24;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [4:0] phase;
  logic [7:0] s1, s2, out;
  logic       sel;
  logic [7:0] model;
  logic       model_sel;
  int checks = 0, failures = 0;

  interleave_mux dut (.clk(clk), .rst(rst), .phase(phase), .sample1(s1),
                      .sample2(s2), .out(out), .sel(sel));

  always #12.5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = '0; s1 = '0; s2 = '0;
    model = '0; model_sel = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 10 * N; i++) begin
      // inputs change every cycle so a wrong phase picks a wrong value
      s1    <= 8'($urandom);
      s2    <= 8'($urandom);
      @(posedge clk);
      // reference register, from the values present before this edge
      #1;
      checks++;
      if (out !== model || sel !== model_sel) begin
        failures++;
        $display("phase %0d: out %02h sel %0d, expected %02h %0d",
                 phase, out, sel, model, model_sel);
      end
      phase <= (phase == N - 1) ? '0 : phase + 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: value of the inputs at the edge that ends phase 23 / 11.
  always @(posedge clk) begin
    if (!rst) begin
      if (phase == 5'(N - 1)) begin model <= s1; model_sel <= 1'b0; end
      else if (phase == 5'(N / 2 - 1)) begin model <= s2; model_sel <= 1'b1; end
    end
  end
endmodule
