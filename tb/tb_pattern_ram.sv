// tb_pattern_ram: checks the 7 x 8 pattern RAM.
//
// Reset values (pointer byte 0, PIRs FF, slot counter 0, standby and spare FF),
// writes to every word, that the standby and spare words ignore writes, and
// the end-of-cycle update: the three PIRs become FF and the slot counter
// advances 0, 1, ..., 35, 0 (checked over 80 cycles from 30, so it wraps three times).
module tb_pattern_ram;
  import pdu_pkg::*;
  logic       clk = 1'b0;
  logic       rst, we, end_cycle;
  pram_word_e raddr, waddr;
  logic [7:0] rdata, wdata;
  int unsigned checks = 0, failures = 0, wraps = 0;

  pattern_ram dut (.clk, .rst, .raddr, .rdata, .we, .waddr, .wdata, .end_cycle);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(pram_word_e a, logic [7:0] v);
    raddr = a;
    #1;
    checks++;
    if (rdata != v) begin
      failures++;
      if (failures < 10) $display("word %0d: read %h, expected %h", a, rdata, v);
    end
  endtask

  task automatic write_word(pram_word_e a, logic [7:0] v);
    @(negedge clk); we = 1'b1; waddr = a; wdata = v;
    @(negedge clk); we = 1'b0;
  endtask

  initial begin
    logic [7:0] tsc;
    rst = 1'b1; we = 1'b0; end_cycle = 1'b0; raddr = W_PTR_HI; waddr = W_PTR_HI; wdata = '0;
    @(negedge clk); @(negedge clk); rst = 1'b0;
    expect_word(W_PTR_HI, 8'h00);
    expect_word(W_PIR1, 8'hFF); expect_word(W_PIR2, 8'hFF); expect_word(W_PIR3, 8'hFF);
    expect_word(W_TSC, 8'h00);
    expect_word(W_STANDBY, 8'hFF); expect_word(W_SPARE, 8'hFF);
    write_word(W_PTR_HI, 8'hA5); write_word(W_PIR1, 8'h11);
    write_word(W_PIR2, 8'h22);   write_word(W_PIR3, 8'h33);
    write_word(W_TSC, 8'd30);    write_word(W_STANDBY, 8'h00);
    write_word(W_SPARE, 8'h01);
    expect_word(W_PTR_HI, 8'hA5); expect_word(W_PIR1, 8'h11);
    expect_word(W_PIR2, 8'h22);   expect_word(W_PIR3, 8'h33);
    expect_word(W_TSC, 8'd30);
    expect_word(W_STANDBY, 8'hFF); expect_word(W_SPARE, 8'hFF);
    tsc = 8'd30;
    for (int n = 0; n < 80; n++) begin
      write_word(pram_word_e'($urandom_range(1, 3)), 8'($urandom_range(0, 254)));
      @(negedge clk); end_cycle = 1'b1;
      @(negedge clk); end_cycle = 1'b0;
      tsc = (tsc == 8'd35) ? 8'd0 : tsc + 8'd1;
      if (tsc == 0) wraps++;
      expect_word(W_PIR1, 8'hFF); expect_word(W_PIR2, 8'hFF); expect_word(W_PIR3, 8'hFF);
      expect_word(W_TSC, tsc);
      expect_word(W_PTR_HI, 8'hA5);
    end
    checks++;
    if (wraps != 3) failures++;   // 30 + 80 steps passes 0 three times
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
