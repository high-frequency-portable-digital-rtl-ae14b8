// Self-checking testbench of adc_interface. Two instances, triggered at
// phase 0 and phase 12 of a 24-cycle frame as in the scope, each drive an
// AD7822 model fed with random codes. Checked: the trigger pulse is low for
// exactly one cycle, at the instance's phase; each conversion's code is in
// sample before the mux takes it (one cycle before the next trigger); done
// pulses once per conversion; the bus idle value is never captured.
`timescale 1ns / 1ps
module tb_adc_interface;
  localparam int unsigned N = 24;
  localparam int unsigned FRAMES = 40;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [4:0] phase;
  logic       convst_n [2];
  logic       eoc_n    [2];
  logic [7:0] data     [2];
  logic [7:0] code     [2];
  logic [7:0] sample   [2];
  logic       done     [2];
  int         conversions [2];
  int         done_count  [2];
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  for (genvar k = 0; k < 2; k++) begin : g_adc
    adc_interface #(.TRIGGER_PHASE(k * N / 2)) dut (
      .clk(clk), .rst(rst), .phase(phase), .convst_n(convst_n[k]),
      .eoc_n(eoc_n[k]), .data(data[k]), .sample(sample[k]), .done(done[k]));
    ad7822_model adc (.convst_n(convst_n[k]), .vin_code(code[k]),
                      .eoc_n(eoc_n[k]), .data(data[k]),
                      .conversions(conversions[k]));
  end

  initial begin
    repeat ((FRAMES + 5) * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference phase counter
  always @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= (phase == N - 1) ? '0 : phase + 1'b1;
  end

  // new random code (never the idle value) for each converter every cycle
  always @(posedge clk) begin
    code[0] <= 8'($urandom_range(0, 254));
    code[1] <= 8'($urandom_range(0, 254));
  end

  always @(posedge clk) begin
    if (done[0]) done_count[0]++;
    if (done[1]) done_count[1]++;
  end

  // cycles since reset was released
  int cyc = 0;
  always @(posedge clk) if (!rst) cyc++;

  // Convert-start check: sampled 1 ns after each edge, from the second frame.
  always @(posedge clk) begin
    #1;
    if (!rst && cyc > int'(N)) begin
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (convst_n[k] != (phase != 5'(k * N / 2))) begin
          failures++;
          $display("adc%0d: convst_n=%0d at phase %0d", k, convst_n[k], phase);
        end
      end
    end
  end

  // Result check: remember the code each model sampled and compare it with
  // sample in the last cycle before the next trigger of that converter.
  logic [7:0] sampled [2];
  for (genvar k = 0; k < 2; k++) begin : g_chk
    always @(negedge convst_n[k]) begin
      #3 sampled[k] = code[k];
    end
    always @(posedge clk) begin
      #2;
      if (!rst && phase == 5'((k * N / 2 + N - 1) % N) && conversions[k] > 0) begin
        checks++;
        if (sample[k] !== sampled[k]) begin
          failures++;
          $display("adc%0d: sample %02h, expected %02h", k, sample[k], sampled[k]);
        end
      end
    end
  end

  initial begin
    done_count[0] = 0; done_count[1] = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (FRAMES * N) @(posedge clk);
    #5;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (conversions[k] < int'(FRAMES) - 1 || conversions[k] > int'(FRAMES) || done_count[k] < conversions[k] - 1 ||
          done_count[k] > conversions[k]) begin
        failures++;
        $display("adc%0d: %0d conversions, %0d done pulses", k, conversions[k], done_count[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
