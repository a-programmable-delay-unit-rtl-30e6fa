// tb_ecac: end-to-end test of one Eight Channel Alarm Clock.
//
// 1. Loads eight random delays through the per-channel latch lines, resets
//    the counter and checks that each channel's pulse starts exactly at its
//    delay (counted in clock edges since reset) and lasts eight clocks.
// 2. Keeps counting and checks that TIMEOUT rises at count 3 * 2**17, where
//    counter bits 18 and 17 are first both set.
// 3. Uses CANDH to stop the count and TEST1/TEST4 to preload it, then checks
//    that a channel fires after the expected number of clocks.
// Also checks the buffered clock and the complement outputs.
module tb_ecac;
  logic        clk = 1'b0;
  logic        reset, out_en, candh;
  logic [19:0] d;
  logic [7:0]  latch, outn, outn_n;
  logic [3:0]  test;
  logic        oclk, oclk_n, timeout, timeout_n;
  int unsigned checks = 0, failures = 0;
  int unsigned delay [8];
  int          rise  [8];
  int unsigned width [8];

  ecac dut (.clk, .reset, .d, .latch, .out_en, .candh, .test,
            .oclk, .oclk_n, .timeout, .timeout_n, .outn, .outn_n);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    int k, t_rise;
    reset = 1'b0; out_en = 1'b0; candh = 1'b0; test = '0; latch = '0; d = '0;
    // 1. load, reset, watch the pulses
    for (int ch = 0; ch < 8; ch++) begin
      delay[ch] = $urandom_range(50, 5000);
      @(negedge clk); d = 20'(delay[ch]); latch = 8'(1) << ch;
    end
    @(negedge clk); latch = '0; d = '1; reset = 1'b1; out_en = 1'b1;
    @(posedge clk);              // counter is 0 after this edge
    @(negedge clk); reset = 1'b0;
    foreach (rise[ch]) begin rise[ch] = -1; width[ch] = 0; end
    k = 0;
    t_rise = -1;
    while (k < 400_000) begin
      #1;
      check(oclk == clk && oclk_n == !clk, "clock buffer");
      check(outn_n == ~outn && timeout_n == !timeout, "complement outputs");
      for (int ch = 0; ch < 8; ch++) begin
        if (outn[ch]) begin
          if (rise[ch] < 0) rise[ch] = k;
          width[ch]++;
        end
      end
      if (timeout && t_rise < 0) t_rise = k;
      @(posedge clk); k++;
      @(negedge clk);
    end
    for (int ch = 0; ch < 8; ch++) begin
      check(rise[ch] == int'(delay[ch]),
            $sformatf("ch %0d: pulse at %0d, delay %0d", ch, rise[ch], delay[ch]));
      check(width[ch] == 8, $sformatf("ch %0d: width %0d", ch, width[ch]));
    end
    check(t_rise == 3 * (1 << 17), $sformatf("timeout at %0d", t_rise));

    // 3. preload through CANDH and TEST, then count on
    @(negedge clk); d = 20'h3002B; latch = 8'h10; reset = 1'b1;
    @(negedge clk); latch = '0; reset = 1'b0; candh = 1'b1;   // one step: 1
    repeat (5) @(negedge clk);                                 // frozen
    for (int i = 0; i < 3; i++) begin                          // section 4 = 3
      @(negedge clk); test = 4'b1000;
      @(negedge clk); test = '0;
    end
    for (int i = 0; i < 2; i++) begin                          // section 1 = 2
      @(negedge clk); test = 4'b0001;
      @(negedge clk); test = '0;
    end
    @(negedge clk); #1 check(outn == '0 && !timeout, "early output during preload");
    candh = 1'b0;                                              // count = 30021
    k = 0;
    t_rise = -1;
    while (k < 20) begin
      @(posedge clk); k++;
      @(negedge clk); #1;
      if (outn[4] && t_rise < 0) t_rise = k;
    end
    check(t_rise == 10, $sformatf("preloaded channel fired after %0d clocks", t_rise));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
