// tb_ecac_counter: random test of the ECAC counter against an integer model.
//
// Each clock the testbench drives reset, CANDH and TEST1-4 at random (biased
// so that the test inputs preload the upper sections and long carries
// happen) and compares the counter with a model: +1 per clock while CANDH is
// low, +1 on the first clock CANDH is seen high, +16**k on the first clock
// TEST(k) is seen high (section k only, wrapping within the section).
module tb_ecac_counter;
  logic        clk = 1'b0;
  logic        reset, candh;
  logic [3:0]  test;
  logic [19:0] count;
  int unsigned checks = 0, failures = 0;
  int unsigned model;
  logic        candh_prev;
  logic [3:0]  test_prev;
  int unsigned long_carries = 0, steps = 0, tsteps = 0;

  ecac_counter dut (.clk, .reset, .candh, .test, .count);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned add_section(int unsigned v, int s);
    int unsigned nib;
    nib = (v >> (4 * s)) & 32'hF;
    return (v & ~(32'hF << (4 * s))) | (((nib + 1) & 32'hF) << (4 * s));
  endfunction

  initial begin
    reset = 1'b1; candh = 1'b0; test = '0;
    @(posedge clk); @(posedge clk);
    model = 0; candh_prev = 1'b0; test_prev = '0;
    for (int cyc = 0; cyc < 200_000; cyc++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 9999) == 0);
      if ($urandom_range(0, 199) == 0) candh = ~candh;
      if (candh && $urandom_range(0, 3) == 0) test = 4'($urandom);
      else if (!candh) test = '0;
      @(posedge clk);
      // model of the edge just taken
      if (reset) model = 0;
      else begin
        // a section steps once if a carry reaches it, a test edge hits
        // it, or both (the two clock sources are ORed)
        int unsigned nxt;
        bit run;
        nxt = model;
        run = !candh || !candh_prev;
        if (run && candh) steps++;
        if (run && (model & 32'hFFF) == 32'hFFF) long_carries++;
        for (int s = 0; s < 5; s++) begin
          bit t;
          t = (s > 0) && test[s-1] && !test_prev[s-1];
          if (t) tsteps++;
          if (run || t) nxt = add_section(nxt, s);
          run = run && (((model >> (4 * s)) & 32'hF) == 32'hF);
        end
        model = nxt;
      end
      candh_prev = candh;
      test_prev  = test;
      #1;
      checks++;
      if (count != 20'(model)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: count %h, expected %h", cyc, count, 20'(model));
      end
    end
    checks++;
    if (long_carries == 0 || steps == 0 || tsteps == 0) begin
      failures++;
      $display("coverage: carries %0d steps %0d test steps %0d", long_carries, steps, tsteps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
