// tb_mode_select_ram: random writes and reads of the 16 x 3 mode RAM,
// compared with an array model; also checks that a read of an address shows
// its data in the same clock (asynchronous read) and that a write touches
// only its own address.
module tb_mode_select_ram;
  logic       clk = 1'b0;
  logic [3:0] addr;
  logic       we;
  logic [2:0] wdata, rdata;
  logic [2:0] model [16];
  int unsigned checks = 0, failures = 0;

  mode_select_ram dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); addr = 4'(i); wdata = 3'(i * 5); we = 1'b1;
      model[i] = 3'(i * 5);
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 4'($urandom); wdata = 3'($urandom); we = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (rdata != model[addr]) begin
        failures++;
        if (failures < 10) $display("addr %0d: read %0d, expected %0d", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
