// tb_ecac_channel: checks one ECAC channel against the pulse rule.
//
// The testbench plays the shared counter itself. For random stored times V
// it counts through V and checks, after every falling edge, that the output
// is high exactly while the counter is in V..V+7 (a pulse eight clocks long)
// and the output enable is set, that out_n is its complement, and that reset
// clears the output. It also checks that loading happens only while
// latch_en is high.
module tb_ecac_channel;
  logic        clk = 1'b0;
  logic        reset, latch_en, out_en, out, out_n;
  logic [19:0] d, count;
  int unsigned checks = 0, failures = 0;

  ecac_channel dut (.clk, .reset, .latch_en, .d, .count, .out_en, .out, .out_n);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    logic [19:0] v, start;
    int unsigned width;
    reset = 1'b1; latch_en = 1'b0; out_en = 1'b1; d = '0; count = '0;
    @(posedge clk); @(posedge clk);
    reset = 1'b0;
    for (int trial = 0; trial < 200; trial++) begin
      v = 20'($urandom);
      if (trial < 4) v = (trial == 0) ? 20'd0 : (trial == 1) ? 20'hFFFF8 : 20'd3 + 20'(trial);
      @(negedge clk);
      d = v; latch_en = 1'b1;
      @(negedge clk);
      latch_en = 1'b0; d = ~v;     // must not be loaded
      out_en = (trial % 7 != 3);
      start = v - 20'd24;
      width = 0;
      for (int k = 0; k < 48; k++) begin
        @(posedge clk);
        count = start + 20'(k);
        @(negedge clk);
        #1;
        check(out == (out_en && (count - v) < 20'd8),
              $sformatf("V=%h count=%h out=%b", v, count, out));
        check(out_n == !out, "out_n is not the complement");
        if (out) width++;
      end
      if (out_en) check(width == 8, $sformatf("V=%h pulse width %0d", v, width));
      else        check(width == 0, "output not gated by out_en");
    end
    // reset clears the output flip-flop in mid-pulse
    @(negedge clk); d = 20'd100; latch_en = 1'b1; out_en = 1'b1;
    @(negedge clk); latch_en = 1'b0;
    @(posedge clk); count = 20'd100;
    @(negedge clk); #1 check(out, "pulse did not start");
    @(posedge clk); count = 20'd101; reset = 1'b1;
    @(negedge clk); #1 check(!out, "reset did not clear output");
    reset = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
