// Self-checking testbench of sample_ram with unrelated write and read
// clocks (40 MHz and 5 MHz, scaled down from the 500 kHz read clock). A
// reference array mirrors every write. Checked: power-up contents are zero;
// after a full write pass with random data every word reads back with the
// two-edge read latency; a second, partial pass overwrites only its words.
`timescale 1ns / 1ps
module tb_sample_ram;
  localparam int unsigned DEPTH = 16384;
  localparam int unsigned AW    = 14;

  logic          wclk = 1'b0, rclk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [7:0]    wdata, q;
  logic [7:0]    ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sample_ram dut (.wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
                  .rclk(rclk), .raddr(raddr), .q(q));

  always #12.5 wclk = ~wclk;
  always #100  rclk = ~rclk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input logic [AW-1:0] a, input logic [7:0] d);
    @(negedge wclk);
    we = 1'b1; waddr = a; wdata = d;
    ref_mem[a] = d;
    @(negedge wclk);
    we = 1'b0;
  endtask

  // address set before rising edge n is registered at n, data out at n+1
  task automatic read_check(input logic [AW-1:0] a);
    @(negedge rclk);
    raddr = a;
    @(posedge rclk);
    @(posedge rclk);
    #1;
    checks++;
    if (q !== ref_mem[a]) begin
      failures++;
      if (failures < 10) $display("addr %0d: read %02h, expected %02h", a, q, ref_mem[a]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < int'(DEPTH); i++) ref_mem[i] = '0;
    // power-up contents
    for (int i = 0; i < 64; i++) read_check(AW'($urandom));
    // full pass
    for (int i = 0; i < int'(DEPTH); i++) write_word(AW'(i), 8'($urandom));
    for (int i = 0; i < int'(DEPTH); i += 7) read_check(AW'(i));
    read_check(AW'(DEPTH - 1));
    // partial overwrite
    for (int i = 100; i < 300; i++) write_word(AW'(i), 8'($urandom));
    for (int i = 90; i < 310; i++) read_check(AW'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
