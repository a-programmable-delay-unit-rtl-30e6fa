// tb_pattern_timing_table: checks the 4K x 20 table.
//
// After reset the table must report busy for exactly 4096 clocks, ignore
// writes meanwhile, and then read all ones at every address. Random writes
// and reads are then compared with an array model; read data appears one
// clock after the address.
module tb_pattern_timing_table;
  logic        clk = 1'b0;
  logic        rst, we, init_busy;
  logic [11:0] addr;
  logic [19:0] wdata, rdata;
  logic [19:0] model [4096];
  int unsigned checks = 0, failures = 0, busy_cycles = 0;

  pattern_timing_table dut (.clk, .rst, .addr, .we, .wdata, .rdata, .init_busy);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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
    rst = 1'b1; we = 1'b0; addr = '0; wdata = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    foreach (model[i]) model[i] = 20'hFFFFF;
    // writes during the fill are ignored
    while (init_busy) begin
      busy_cycles++;
      addr = 12'($urandom); wdata = 20'($urandom); we = 1'b1;
      @(negedge clk);
    end
    we = 1'b0;
    check(busy_cycles == 4096, $sformatf("busy for %0d clocks", busy_cycles));
    for (int i = 0; i < 4096; i++) begin
      addr = 12'(i);
      @(negedge clk);
      check(rdata == 20'hFFFFF, $sformatf("addr %h after fill: %h", i, rdata));
    end
    for (int n = 0; n < 10000; n++) begin
      addr = 12'($urandom_range(0, 63)); wdata = 20'($urandom);
      we = $urandom_range(0, 1) == 1;
      @(negedge clk);
      check(rdata == model[addr], $sformatf("addr %h: read %h, expected %h", addr, rdata, model[addr]));
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
