// tb_pdu_controller: checks the PDU controller with the real mode RAM,
// pattern RAM and timing table around it; the ECACs are replaced by a
// recorder of the words presented on each latch line.
//
// Covers: commands rejected (Q=0) while the table fills and while a
// programming cycle runs; table writes and reads with pointer
// auto-increment and carry into the upper byte; mode and PIR/slot-counter
// access; the programming cycle (each channel loaded from the row its mode
// selects, ECAC reset once, outputs enabled at the end, PIRs set to FF, slot
// counter advanced, pointer restored) for a detector fiducial and a CAMAC
// fiducial; the cycle length; status latching and clearing; clock select;
// X=0 for an unknown function.
module tb_pdu_controller;
  import pdu_pkg::*;
  logic clk = 1'b0, rst;
  logic cmd_valid, rsp_valid, fid_det, timeout;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic [3:0]  msr_addr;
  logic        msr_we;
  logic [2:0]  msr_wdata, msr_rdata;
  pram_word_e  pram_raddr, pram_waddr;
  logic [7:0]  pram_rdata, pram_wdata;
  logic        pram_we, pram_end_cycle;
  logic [11:0] ptt_addr;
  logic        ptt_we, ptt_busy;
  logic [19:0] ptt_wdata, ptt_rdata;
  logic        ecac_reset, out_en, int_clk_sel, fid_seen, fid_missing, busy;
  logic [15:0] ecac_latch;

  int unsigned checks = 0, failures = 0;
  int unsigned rejects = 0, resets = 0, loads = 0;
  logic [19:0] loaded [16];
  int          load_count [16];
  logic [2:0]  mode_of [16];

  pdu_controller dut (.*);
  mode_select_ram u_msr (.clk, .addr(msr_addr), .we(msr_we), .wdata(msr_wdata), .rdata(msr_rdata));
  pattern_ram u_pram (.clk, .rst, .raddr(pram_raddr), .rdata(pram_rdata), .we(pram_we),
                      .waddr(pram_waddr), .wdata(pram_wdata), .end_cycle(pram_end_cycle));
  pattern_timing_table u_ptt (.clk, .rst, .addr(ptt_addr), .we(ptt_we), .wdata(ptt_wdata),
                              .rdata(ptt_rdata), .init_busy(ptt_busy));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ECAC stand-in: record what each latch line loads
  always @(posedge clk) begin
    if (ecac_reset) resets++;
    if (ecac_latch != '0) begin
      checks++;
      if (!$onehot(ecac_latch)) failures++;
      for (int c = 0; c < 16; c++)
        if (ecac_latch[c]) begin
          loaded[c] = ptt_rdata;
          load_count[c]++;
          loads++;
        end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  function automatic logic [19:0] ptt_val(logic [7:0] row, logic [3:0] ch);
    return {4'h8, row, ch, 4'h3};
  endfunction

  task automatic camac(input logic [4:0] f, input logic [3:0] a, input logic [23:0] w,
                       output logic [23:0] r, output logic q, output logic x);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{f: f, a: a, w: w};
    @(negedge clk);
    cmd_valid = 1'b0;
    for (int i = 0; i < 4 && !rsp_valid; i++) @(negedge clk);
    check(rsp_valid, $sformatf("no reply to F%0d A%0d", f, a));
    r = rsp.r; q = rsp.q; x = rsp.x;
    if (!q && x) rejects++;
  endtask

  task automatic cmd_ok(input logic [4:0] f, input logic [3:0] a, input logic [23:0] w,
                        output logic [23:0] r);
    logic q, x;
    camac(f, a, w, r, q, x);
    check(q && x, $sformatf("F%0d A%0d: Q=%b X=%b", f, a, q, x));
  endtask

  task automatic expect_read(input logic [4:0] f, input logic [3:0] a, input logic [23:0] v);
    logic [23:0] r;
    cmd_ok(f, a, '0, r);
    check(r == v, $sformatf("F%0d A%0d read %h, expected %h", f, a, r, v));
  endtask

  // Check one programming cycle: rows[] gives the row each channel must use.
  task automatic check_cycle(input logic [7:0] rows [16], input int resets_before);
    for (int c = 0; c < 16; c++) begin
      check(load_count[c] == 1, $sformatf("ch %0d loaded %0d times", c, load_count[c]));
      check(loaded[c] == ptt_val(rows[c], 4'(c)),
            $sformatf("ch %0d loaded %h, expected %h", c, loaded[c], ptt_val(rows[c], 4'(c))));
    end
    check(resets == resets_before + 1, "ECAC reset not pulsed once");
    check(out_en, "outputs not enabled after cycle");
  endtask

  initial begin
    logic [23:0] r;
    logic q, x;
    logic [7:0] rows [16];
    static logic [7:0] table_rows [6] = '{8'h12, 8'h34, 8'h56, 8'd6, 8'd7, 8'hFF};
    int t0, t1, rb;
    rst = 1'b1; cmd_valid = 1'b0; cmd = '0; fid_det = 1'b0; timeout = 1'b0;
    foreach (load_count[c]) load_count[c] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // rejected while the table fills
    camac(F_READ_REG, 4'd0, '0, r, q, x);
    check(!q && x, "command accepted during table fill");
    while (ptt_busy) @(negedge clk);
    expect_read(F_READ_PTT, 4'd0, 24'hFFFFF);     // filled with ones
    // fill rows, pointer auto-increment
    foreach (table_rows[i]) begin
      cmd_ok(F_WRITE_REG, 4'd0, {12'd0, table_rows[i], 4'd0}, r);
      for (int c = 0; c < 16; c++) cmd_ok(F_WRITE_PTT, 4'd0, 24'(ptt_val(table_rows[i], 4'(c))), r);
      // the pointer has carried into the next row
      expect_read(F_READ_REG, 4'd0, 24'({table_rows[i] + 8'd1, 4'd0}));
    end
    // read back one row with auto-increment
    cmd_ok(F_WRITE_REG, 4'd0, 24'h340, r);
    for (int c = 0; c < 16; c++) expect_read(F_READ_PTT, 4'd0, 24'(ptt_val(8'h34, 4'(c))));
    expect_read(F_READ_REG, 4'd0, 24'h350);
    // modes: channel c uses PIR1, PIR2, PIR3, slot counter, standby in turn
    for (int c = 0; c < 16; c++) begin
      mode_of[c] = 3'(c % 5 + 1);
      cmd_ok(F_WRITE_REG, 4'd0, 24'(c), r);
      cmd_ok(F_WRITE_REG, 4'd1, 24'(mode_of[c]), r);
    end
    for (int c = 0; c < 16; c++) begin
      cmd_ok(F_WRITE_REG, 4'd0, 24'(c), r);
      expect_read(F_READ_REG, 4'd1, 24'(mode_of[c]));
    end
    cmd_ok(F_WRITE_PIR, 4'd8,  24'h12, r);
    cmd_ok(F_WRITE_PIR, 4'd9,  24'h34, r);
    cmd_ok(F_WRITE_PIR, 4'd10, 24'h56, r);
    cmd_ok(F_WRITE_PIR, 4'd11, 24'd6,  r);
    expect_read(F_READ_REG, 4'd8, 24'h12);
    expect_read(F_READ_REG, 4'd11, 24'd6);
    cmd_ok(F_WRITE_REG, 4'd0, 24'h9A7, r);
    expect_read(F_READ_REG, 4'd2, 24'b00000);      // status clear after reset

    // fiducial from the detector
    rb = resets;
    foreach (load_count[c]) load_count[c] = 0;
    @(negedge clk); fid_det = 1'b1; t0 = int'($time / 10);
    repeat (2) @(negedge clk); fid_det = 1'b0;
    @(negedge clk);
    check(busy && !out_en, "cycle not running");
    camac(F_READ_REG, 4'd0, '0, r, q, x);
    check(!q && x, "command accepted during programming cycle");
    while (!out_en) @(negedge clk);
    t1 = int'($time / 10);
    check(t1 - t0 <= 40, $sformatf("cycle took %0d clocks", t1 - t0));
    $display("fiducial to output enable: %0d clocks", t1 - t0);
    foreach (rows[c]) rows[c] = (mode_of[c] == 1) ? 8'h12 : (mode_of[c] == 2) ? 8'h34 :
                                (mode_of[c] == 3) ? 8'h56 : (mode_of[c] == 4) ? 8'd6 : 8'hFF;
    check_cycle(rows, rb);
    expect_read(F_READ_REG, 4'd0, 24'h9A7);        // pointer restored
    expect_read(F_READ_REG, 4'd8, 24'hFF);
    expect_read(F_READ_REG, 4'd9, 24'hFF);
    expect_read(F_READ_REG, 4'd10, 24'hFF);
    expect_read(F_READ_REG, 4'd11, 24'd7);         // slot counter advanced
    expect_read(F_READ_REG, 4'd2, 24'b01001);      // enabled, fiducial seen

    // fiducial from CAMAC: PIR channels now use the standby row
    rb = resets;
    foreach (load_count[c]) load_count[c] = 0;
    cmd_ok(F_FIDUCIAL, 4'd0, '0, r);
    while (!out_en || busy) @(negedge clk);
    foreach (rows[c]) rows[c] = (mode_of[c] == 4) ? 8'd7 : 8'hFF;
    check_cycle(rows, rb);
    expect_read(F_READ_REG, 4'd11, 24'd8);

    // missing fiducial status, clear, clock select, unknown function
    @(negedge clk); timeout = 1'b1;
    @(negedge clk); timeout = 1'b0;
    expect_read(F_READ_REG, 4'd2, 24'b01011);
    cmd_ok(F_CLR_STATUS, 4'd2, '0, r);
    expect_read(F_READ_REG, 4'd2, 24'b01000);
    cmd_ok(F_INT_CLK_ON, 4'd0, '0, r);
    check(int_clk_sel, "internal clock not selected");
    expect_read(F_READ_REG, 4'd2, 24'b11000);
    cmd_ok(F_INT_CLK_OFF, 4'd0, '0, r);
    check(!int_clk_sel, "internal clock still selected");
    camac(5'd5, 4'd0, '0, r, q, x);
    check(!x && !q, "unknown function answered X");
    check(rejects == 2, $sformatf("%0d rejected commands", rejects));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
