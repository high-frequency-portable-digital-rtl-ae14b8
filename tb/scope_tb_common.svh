// Shared body of the scope_top end-to-end testbenches. The including module
// defines DEPTH (capture depth), SCLK_HALF_NS (half period of the SPI clock),
// CAPTURES, WAVE[CAPTURES] (input of each capture: RAMP gives every
// conversion the next code; SINE, SQUARE and SAW are 100 kHz signals of peak
// amplitude PEAK_V through the analog front end) and instantiates the design
// as `dut` on the signals declared here.
//
// Analog side: the front end maps the probe voltage v to v/4 + 1 V and the
// converter turns 0..2 V into codes 0..255, so code = floor((v/4 + 1) / 2 * 256).
// Each AD7822 model samples the code 2 ns after its trigger; the testbench
// logs every sampled code in time order, independently of the design.
//
// Host side (like the capture program of the host board): raise starter with
// sclk running, wait for the capture time, lower starter, then read DEPTH
// 16-bit words (cs_n low for 16 sclk cycles, miso sampled on falling edges)
// and keep the low byte. The words must be DEPTH consecutive entries of the
// conversion log, starting within a few samples of the start request.

  localparam int unsigned N         = 24;       // clk cycles per frame
  localparam real         CLK_HALF  = 12.5;     // 40 MHz
  localparam real         PI        = 3.14159265358979;
  localparam int          RAMP = 0, SINE = 1, SQUARE = 2, SAW = 3;

  logic       clk = 1'b0, sclk = 1'b0, rst = 1'b1;
  logic       convst1_n, convst2_n, eoc1_n, eoc2_n;
  logic [7:0] data1, data2, led;
  logic [7:0] code1, code2;
  logic       mosi = 1'b0, starter = 1'b0, cs_n = 1'b1, miso;
  int         conv1, conv2;
  int checks = 0, failures = 0;

  always #(CLK_HALF) clk = ~clk;
  always #(SCLK_HALF_NS) sclk = ~sclk;

  ad7822_model adc1 (.convst_n(convst1_n), .vin_code(code1), .eoc_n(eoc1_n),
                     .data(data1), .conversions(conv1));
  ad7822_model adc2 (.convst_n(convst2_n), .vin_code(code2), .eoc_n(eoc2_n),
                     .data(data2), .conversions(conv2));

  // ---------------------------------------------------------------- analog
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int wave = RAMP;   // input of the current capture

  // converter code of a probe voltage
  function automatic int code_of(real v);
    int k;
    k = int'($floor((v / 4.0 + 1.0) / 2.0 * 256.0));
    if (k < 0)   k = 0;
    if (k > 255) k = 255;
    return k;
  endfunction

  function automatic logic [7:0] input_code(longint c);
    real t, ph, v;
    t  = real'(c) * 25.0e-9;
    ph = t * 100.0e3 - $floor(t * 100.0e3);   // phase within the period, 0..1
    case (wave)
      SINE:    v = PEAK_V * $sin(2.0 * PI * ph);
      SQUARE:  v = (ph < 0.5) ? PEAK_V : -PEAK_V;
      SAW:     v = PEAK_V * (2.0 * ph - 1.0);
      default: return 8'(c / (N / 2));
    endcase
    return 8'(code_of(v));
  endfunction

  always @(posedge clk) begin
    code1 <= input_code(cyc);
    code2 <= input_code(cyc);
  end

  // conversion log, in time order
  logic [7:0] conv_log [$];
  longint     last_trigger_cyc = -1;
  int         which_last = 0, alternations = 0, spacing_errors = 0;

  always @(negedge convst1_n) begin
    #3 conv_log.push_back(code1);
    note_trigger(1);
  end
  always @(negedge convst2_n) begin
    #3 conv_log.push_back(code2);
    note_trigger(2);
  end

  // the converters must alternate, one trigger every N/2 cycles
  function automatic void note_trigger(int which);
    if (last_trigger_cyc >= 0) begin
      if (which != which_last) alternations++;
      else spacing_errors++;
      if (cyc - last_trigger_cyc != longint'(N / 2)) spacing_errors++;
    end
    last_trigger_cyc = cyc;
    which_last = which;
  endfunction

  // ------------------------------------------------------------ mechanisms
  int full_events = 0, writes_while_full = 0, restarts_seen = 0;
  int reads_before_full = 0, reads_past_end = 0, mux_from1 = 0, mux_from2 = 0;
  longint start_cyc = 0, fill_cycles = 0;

  always @(posedge clk) begin
    if (!rst && dut.u_wr.restart) begin
      if (!$past(dut.u_wr.restart)) restarts_seen++;
      start_cyc <= cyc;
    end
    if (!rst && dut.full_clk && !$past(dut.full_clk)) begin
      full_events++;
      fill_cycles <= cyc - start_cyc;
    end
    if (dut.full_clk && dut.wren) writes_while_full++;
    if (!rst && dut.u_timer.phase == 5'(N - 1)) mux_from1++;
    if (!rst && dut.u_timer.phase == 5'(N / 2 - 1)) mux_from2++;
  end

  // ------------------------------------------------------------------ host
  task automatic xfer(output logic [15:0] w);
    @(negedge sclk);
    cs_n = 1'b0;
    for (int i = 0; i < 16; i++) begin
      @(posedge sclk);
      @(negedge sclk);
      w = {w[14:0], miso};
    end
    cs_n = 1'b1;
    @(negedge sclk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] words [];

  task automatic capture(input int n);
    logic [15:0] w;
    int          log_at_start, off, mism, hi_nonzero;
    int          wait_ns;
    words = new[DEPTH];
    wave = WAVE[n - 1];
    @(negedge sclk) starter = 1'b1;
    log_at_start = conv_log.size();
    // read attempt while the capture is still running: the slave waits
    repeat (4) @(negedge sclk);
    xfer(w);
    reads_before_full++;
    check(w == 16'h0000, $sformatf("capture %0d: word before full is %04h", n, w));
    // wait for the capture (1.1 x its length), then release the pin
    wait_ns = int'(DEPTH) * (N / 2) * 25 * 11 / 10;
    #(wait_ns * 1ns);
    starter = 1'b0;
    check(dut.full_sclk == 1'b1, $sformatf("capture %0d: RAM full after the capture time", n));
    hi_nonzero = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      xfer(w);
      words[i] = w[7:0];
      if (w[15:8] != 0) hi_nonzero++;
    end
    check(hi_nonzero == 0, $sformatf("capture %0d: %0d words with a non-zero high byte", n, hi_nonzero));
    // one read past the end: address holds at the depth
    xfer(w);
    reads_past_end++;
    check(dut.u_spi.raddr == (DEPTH), $sformatf("capture %0d: read address %0d at end", n, dut.u_spi.raddr));
    // locate the capture in the conversion log
    off = -1;
    // the request crosses a 2-flop synchronizer and an edge detector in the
    // sclk domain (up to 4 sclk periods) before it reaches the clk domain
    for (int o = (log_at_start > 4 ? log_at_start - 4 : 0);
         o <= log_at_start + int'(8.0 * SCLK_HALF_NS / 300.0) + 8; o++) begin
      if (o + int'(DEPTH) > conv_log.size()) break;
      mism = 0;
      for (int i = 0; i < int'(DEPTH) && mism == 0; i++)
        if (words[i] != conv_log[o + i]) mism++;
      if (mism == 0) begin off = o; break; end
    end
    if (off < 0) begin
      int o = log_at_start;
      for (int i = 0, shown = 0; i < int'(DEPTH) && shown < 8; i++)
        if (words[i] != conv_log[o + i]) begin
          $display("  word %0d: %0d, conversion %0d: %0d", i, words[i], o + i, conv_log[o + i]);
          shown++;
        end
    end
    check(off >= 0, $sformatf("capture %0d: %0d words are not consecutive conversions near sample %0d",
                              n, DEPTH, log_at_start));
    if (off >= 0)
      $display("capture %0d: %0d samples match conversions %0d.., start requested at %0d, filled in %0d cycles",
               n, DEPTH, off, log_at_start, fill_cycles);
    if (wave != RAMP) check_wave(n);
    // rate: one sample every N/2 cycles, so DEPTH samples take DEPTH*N/2
    check(fill_cycles >= longint'((DEPTH - 1) * N / 2) && fill_cycles <= longint'((DEPTH + 2) * N / 2),
          $sformatf("capture %0d: filled in %0d cycles, expected %0d", n, fill_cycles, DEPTH * N / 2));
  endtask

  // Shape of a captured periodic input: its extreme codes must be those of
  // +-PEAK_V after the front end, and at 3.33 Msps a 100 kHz signal crosses
  // mid-scale upward once per 33.3 samples. A square wave takes only its two
  // levels; a sawtooth falls only once per period.
  task automatic check_wave(input int n);
    int lo = 255, hi = 0, rising = 0, levels_other = 0, falls = 0;
    int exp_lo = code_of(-PEAK_V), exp_hi = code_of(PEAK_V);
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (words[i] < lo) lo = words[i];
      if (words[i] > hi) hi = words[i];
      if (i > 0 && words[i - 1] < 8'd128 && words[i] >= 8'd128) rising++;
      if (words[i] != exp_lo && words[i] != exp_hi) levels_other++;
      if (i > 0 && words[i] + 8'd8 < words[i - 1]) falls++;
    end
    $display("capture %0d (wave %0d): codes %0d..%0d (expected %0d..%0d), %0d rising crossings",
             n, wave, lo, hi, exp_lo, exp_hi, rising);
    check(lo >= exp_lo && lo <= exp_lo + 4 && hi <= exp_hi && hi >= exp_hi - 4,
          $sformatf("capture %0d: amplitude", n));
    check(rising >= int'(DEPTH) / 34 - 2 && rising <= int'(DEPTH) / 33 + 2,
          $sformatf("capture %0d: frequency", n));
    if (wave == SQUARE) check(levels_other == 0, $sformatf("capture %0d: square levels", n));
    if (wave == SAW)    check(falls >= rising - 1 && falls <= rising + 1,
                              $sformatf("capture %0d: one fall per sawtooth period", n));
  endtask

  initial begin
    repeat (4) @(posedge sclk);
    rst = 1'b0;
    repeat (4) @(posedge sclk);
    for (int n = 1; n <= CAPTURES; n++) capture(n);
    // every mechanism must have happened
    $display("mechanisms: alternations=%0d spacing_errors=%0d mux_from1=%0d mux_from2=%0d full=%0d",
             alternations, spacing_errors, mux_from1, mux_from2, full_events);
    $display("            writes_while_full=%0d restarts=%0d reads_before_full=%0d reads_past_end=%0d",
             writes_while_full, restarts_seen, reads_before_full, reads_past_end);
    check(alternations > 0 && spacing_errors == 0, "converters alternate every 12 cycles");
    check(conv1 > 0 && conv2 > 0 && (conv1 - conv2) <= 1 && (conv2 - conv1) <= 1,
          "both converters used equally");
    check(mux_from1 > 0 && mux_from2 > 0, "mux took both converters");
    check(full_events == CAPTURES, "RAM filled once per capture");
    check(writes_while_full == 0, "no write while full");
    check(restarts_seen == CAPTURES, "one restart per capture");
    check(reads_before_full == CAPTURES, "read attempted before full");
    check(reads_past_end == CAPTURES, "read past the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
