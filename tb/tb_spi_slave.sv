// Self-checking testbench of spi_slave with a 32-word RAM model (two read
// registers, like the capture RAM) and a host model that makes 16-bit SPI
// transfers, chip select low for the whole word, sampling miso on falling
// sclk edges. Checked: a rising edge on the starter pin gives exactly one
// start pulse and clears the read address; no word is loaded while the RAM
// is not full; with the RAM full, transfer i returns word i in its low byte
// and zeros in its high byte; the read address stops at the depth, and a
// new start request rewinds it so the capture can be read again.
`timescale 1ns / 1ps
module tb_spi_slave;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW    = 5;

  logic          sclk = 1'b0;
  logic          rst = 1'b1;
  logic          starter = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic          start, ram_full = 1'b0;
  logic [AW:0]   raddr;
  logic [7:0]    ram_q;
  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] raddr_q;
  int            starts = 0;
  int checks = 0, failures = 0;

  spi_slave #(.RAM_DEPTH(DEPTH)) dut (
    .sclk(sclk), .rst(rst), .starter(starter), .cs_n(cs_n), .mosi(mosi),
    .miso(miso), .start(start), .ram_full(ram_full), .raddr(raddr),
    .ram_q(ram_q));

  always #100 sclk = ~sclk;

  // RAM model with registered address and output
  always @(posedge sclk) begin
    raddr_q <= raddr[AW-1:0];
    ram_q   <= mem[raddr_q];
  end

  always @(posedge sclk) if (start) starts++;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(output logic [15:0] w);
    @(negedge sclk);
    cs_n = 1'b0;
    mosi = 1'b1;
    for (int i = 0; i < 16; i++) begin
      @(posedge sclk);
      @(negedge sclk);
      w = {w[14:0], miso};
    end
    cs_n = 1'b1;
    mosi = 1'b0;
    repeat (2) @(negedge sclk);
  endtask

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %04h, expected %04h", what, got, exp);
    end
  endtask

  task automatic request_start();
    int s0 = starts;
    @(negedge sclk) starter = 1'b1;
    repeat (6) @(negedge sclk);
    starter = 1'b0;
    repeat (6) @(negedge sclk);
    check("start pulses", 16'(starts - s0), 16'd1);
    check("read address after start", 16'(raddr), 16'd0);
  endtask

  initial begin
    logic [15:0] w;
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = 8'($urandom);
    repeat (3) @(posedge sclk);
    rst = 1'b0;
    request_start();
    // RAM not yet full: nothing is loaded
    xfer(w);
    check("transfer before full", w, 16'h0000);
    check("address before full", 16'(raddr), 16'd0);
    ram_full = 1'b1;
    repeat (3) @(negedge sclk);
    for (int i = 0; i < int'(DEPTH); i++) begin
      xfer(w);
      check($sformatf("word %0d", i), w, {8'h00, mem[i]});
    end
    check("address at end", 16'(raddr), 16'(DEPTH));
    xfer(w);   // past the end: address holds, word 0 is repeated
    check("address saturates", 16'(raddr), 16'(DEPTH));
    check("word past end", w, {8'h00, mem[0]});
    // second read of the same capture after a new request
    request_start();
    for (int i = 0; i < 4; i++) begin
      xfer(w);
      check($sformatf("reread word %0d", i), w, {8'h00, mem[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
