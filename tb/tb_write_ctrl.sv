// Self-checking testbench of write_ctrl with a small RAM (64 words) so the
// full condition is reached quickly. Checked every cycle against a reference
// counter: wren only at phases 0 and 12 and only while not full and not
// restarting; the address increments by one per write; full after exactly
// 64 writes, which takes 64 * 12 cycles (one write per interleaved sample);
// nothing written while full; a restart pulse clears the address and a new
// capture fills again.
`timescale 1ns / 1ps
module tb_write_ctrl;
  localparam int unsigned N     = 24;
  localparam int unsigned DEPTH = 64;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       restart = 1'b0;
  logic [4:0] phase;
  logic [5:0] waddr;
  logic       wren, full;
  int         ref_count;
  int         cycles_to_full, cyc, fills;
  int checks = 0, failures = 0;

  write_ctrl #(.RAM_DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .restart(restart), .phase(phase),
    .waddr(waddr), .wren(wren), .full(full));

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= (phase == N - 1) ? '0 : phase + 1'b1;
  end

  // reference model, checked just before each edge
  always @(negedge clk) begin
    logic exp_wren;
    if (!rst) begin
      exp_wren = (ref_count < int'(DEPTH)) && !restart && (phase == 0 || phase == N / 2);
      checks++;
      if (wren !== exp_wren || full !== (ref_count >= int'(DEPTH)) ||
          (ref_count < int'(DEPTH) && waddr !== 6'(ref_count))) begin
        failures++;
        if (failures < 10)
          $display("phase %0d: wren %0d full %0d addr %0d, reference count %0d",
                   phase, wren, full, waddr, ref_count);
      end
    end
  end

  always @(posedge clk) begin
    if (rst || restart) ref_count <= 0;
    else if (wren && ref_count < int'(DEPTH)) ref_count <= ref_count + 1;
    cyc <= cyc + 1;
  end

  task automatic wait_full_and_measure();
    int t0 = cyc;
    while (!full) @(posedge clk);
    cycles_to_full = cyc - t0;
    fills++;
    checks++;
    // first write is at most one slot after the start; 64 writes 12 apart
    if (cycles_to_full < int'((DEPTH - 1) * N / 2) ||
        cycles_to_full > int'((DEPTH + 1) * N / 2)) begin
      failures++;
      $display("filled in %0d cycles, expected about %0d", cycles_to_full, DEPTH * N / 2);
    end
  endtask

  initial begin
    cyc = 0; fills = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait_full_and_measure();
    repeat (100) @(posedge clk);   // full: nothing written
    // restart request lasting several cycles, in mid-frame
    repeat (5) @(posedge clk);
    restart <= 1'b1;
    repeat (4) @(posedge clk);
    restart <= 1'b0;
    wait_full_and_measure();
    // restart while filling
    repeat (50) @(posedge clk);
    restart <= 1'b1;
    @(posedge clk);
    restart <= 1'b0;
    repeat (200) @(posedge clk);
    restart <= 1'b1;
    repeat (13) @(posedge clk);
    restart <= 1'b0;
    wait_full_and_measure();
    checks++;
    if (fills != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
