// tb_pdu_top: end-to-end test of the Programmable Delay Unit at its full
// size (no parameter is changed).
//
// The testbench generates the FIDO train (8.4 ns period, 4.2 ns pulses, one
// pulse left out for each fiducial) and uses it as the module clock, as the
// real module does; the 7 ns delay line is modelled as a second copy of the
// train, inverted and 7 ns late. A CAMAC dataway model sets up a delay table,
// modes, Pattern Input Registers and the slot counter, then three fiducials
// are produced (two in the FIDO train, one by CAMAC). For every fiducial all
// sixteen outputs must pulse exactly V clocks after the ECAC reset, where V
// is the table entry for the row the channel's mode selects, and each pulse
// must be eight clocks long. Afterwards the train is left without fiducials
// until the missing-fiducial status appears.
//
// Mechanisms counted (each must occur): command rejected during the table
// fill and during a programming cycle, pointer carry into the upper byte,
// auto-incrementing table read, fiducial from FIDO, fiducial from CAMAC, PIR
// rows used and then reset to the standby row, slot counter wrap 35 -> 0,
// pointer restored, CANDH freeze, TEST preload, missing-fiducial timeout,
// internal clock select.
`timescale 1ns/1ps
module tb_pdu_top;
  import pdu_pkg::*;
  logic        clk, rst, fido = 1'b1, fido_dly_n = 1'b1;
  logic        cmd_valid, rsp_valid;
  camac_cmd_t  cmd;
  camac_rsp_t  rsp;
  logic [1:0]  candh, oclk, oclk_n;
  logic [1:0][3:0] test;
  logic [15:0] out, out_n;
  logic        int_clk_sel, fid_seen, fid_missing, busy;

  int unsigned checks = 0, failures = 0;
  int          edge_no = 0;         // rising clock edges so far
  bit          drop_pulse = 1'b0;   // request: leave out the next pulse
  int          fid_edge = -1;       // first rising edge after the last missing pulse
  int          rise_edge [16];
  int          width [16];
  logic [15:0] out_prev = '0;

  typedef enum int {
    M_REJECT_FILL, M_REJECT_CYCLE, M_PTR_CARRY, M_AUTOINC_READ, M_FID_FIDO,
    M_FID_CAMAC, M_PIR_ROWS, M_STANDBY_ROW, M_TSC_WRAP, M_PTR_RESTORE,
    M_CANDH, M_TEST, M_TIMEOUT, M_INT_CLK, M_COUNT
  } mech_e;
  int unsigned mech [M_COUNT];

  pdu_top dut (.*);

  assign clk = fido;

  // FIDO train and the delayed, inverted copy (see header). Within period
  // p starting at T: fido = h(p) on [T, T+4.2), 0 after; the copy is
  // !h(p-1) on [T, T+2.8), 1 on [T+2.8, T+7), !h(p) on [T+7, T+8.4).
  initial begin
    bit h, h_prev;
    h_prev = 1'b1;
    forever begin
      h = !drop_pulse;
      if (drop_pulse) begin
        drop_pulse = 1'b0;
        fid_edge = edge_no + 1;
      end
      fido = h; fido_dly_n = !h_prev;
      #2.8 fido_dly_n = 1'b1;
      #1.4 fido = 1'b0;
      #2.8 fido_dly_n = !h;
      #1.4 h_prev = h;
    end
  end

  always @(posedge clk) edge_no++;

  // output monitor, sampling just after each falling edge, when the output
  // flip-flops have settled
  always begin
    @(negedge clk);
    #1;
    for (int c = 0; c < 16; c++) begin
      if (out[c] && !out_prev[c] && rise_edge[c] < 0) rise_edge[c] = edge_no;
      if (out[c]) width[c]++;
    end
    checks++;
    if (out_n != ~out) failures++;
    out_prev = out;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("%t: %s", $time, what);
    end
  endtask

  // table contents: distinct per row and channel, all above the ~40 clocks
  // a programming cycle takes
  function automatic int dly(logic [7:0] row, int ch);
    return 100 + 37 * ch + 3 * int'(row);
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
  endtask

  task automatic cmd_ok(input logic [4:0] f, input logic [3:0] a, input logic [23:0] w);
    logic [23:0] r;
    logic q, x;
    camac(f, a, w, r, q, x);
    check(q && x, $sformatf("F%0d A%0d: Q=%b X=%b", f, a, q, x));
  endtask

  task automatic read_ok(input logic [4:0] f, input logic [3:0] a, output logic [23:0] r);
    logic q, x;
    camac(f, a, '0, r, q, x);
    check(q && x, $sformatf("F%0d A%0d: Q=%b X=%b", f, a, q, x));
  endtask

  task automatic clear_monitor();
    foreach (rise_edge[c]) begin rise_edge[c] = -1; width[c] = 0; end
  endtask

  // Wait for the pulses of one fiducial and compare them with the table.
  // reset_edge: the rising edge after which the ECAC counters read 0.
  task automatic check_pulses(int reset_edge, logic [7:0] rows [16], int offset [16]);
    int exp_edge;
    while (edge_no < reset_edge + 1500) @(negedge clk);
    for (int c = 0; c < 16; c++) begin
      exp_edge = reset_edge + dly(rows[c], c) + offset[c];
      check(rise_edge[c] == exp_edge,
            $sformatf("ch %0d: pulse at edge %0d, expected %0d (row %h)",
                      c, rise_edge[c], exp_edge, rows[c]));
      check(width[c] == 8, $sformatf("ch %0d: width %0d", c, width[c]));
    end
  endtask

  initial begin
    logic [23:0] r;
    logic q, x;
    logic [2:0] mode [16];
    logic [7:0] rows [16];
    int offset [16];
    static logic [7:0] table_rows [7] = '{8'h12, 8'h34, 8'h56, 8'd34, 8'd35, 8'd0, 8'hFF};
    int t_start, reset_edge;

    rst = 1'b1; cmd_valid = 1'b0; cmd = '0; candh = '0; test = '0;
    clear_monitor();
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // ---- set-up over CAMAC ----
    camac(F_READ_REG, 4'd2, '0, r, q, x);
    check(!q && x, "command accepted during table fill");
    if (!q && x) mech[M_REJECT_FILL]++;
    while (busy) @(negedge clk);
    read_ok(F_READ_PTT, 4'd0, r);
    check(r == 24'hFFFFF, $sformatf("table not initialised: %h", r));
    foreach (table_rows[i]) begin
      cmd_ok(F_WRITE_REG, 4'd0, {12'd0, table_rows[i], 4'd0});
      for (int c = 0; c < 16; c++) cmd_ok(F_WRITE_PTT, 4'd0, 24'(dly(table_rows[i], c)));
      read_ok(F_READ_REG, 4'd0, r);
      check(r == 24'({table_rows[i] + 8'd1, 4'd0}), $sformatf("pointer %h after row %h", r, table_rows[i]));
      if (r[11:4] == table_rows[i] + 8'd1) mech[M_PTR_CARRY]++;
    end
    cmd_ok(F_WRITE_REG, 4'd0, 24'h120);
    for (int c = 0; c < 16; c++) begin
      read_ok(F_READ_PTT, 4'd0, r);
      check(r == 24'(dly(8'h12, c)), $sformatf("table read ch %0d: %h", c, r));
      if (r == 24'(dly(8'h12, c))) mech[M_AUTOINC_READ]++;
    end
    for (int c = 0; c < 16; c++) begin
      mode[c] = 3'(c % 5 + 1);     // PIR1, PIR2, PIR3, slot counter, standby
      cmd_ok(F_WRITE_REG, 4'd0, 24'(c));
      cmd_ok(F_WRITE_REG, 4'd1, 24'(mode[c]));
    end
    cmd_ok(F_WRITE_PIR, 4'd8,  24'h12);
    cmd_ok(F_WRITE_PIR, 4'd9,  24'h34);
    cmd_ok(F_WRITE_PIR, 4'd10, 24'h56);
    cmd_ok(F_WRITE_PIR, 4'd11, 24'd34);
    cmd_ok(F_WRITE_REG, 4'd0, 24'h9A7);
    cmd_ok(F_INT_CLK_ON, 4'd0, '0);
    check(int_clk_sel, "internal clock select");
    if (int_clk_sel) mech[M_INT_CLK]++;
    cmd_ok(F_INT_CLK_OFF, 4'd0, '0);
    check(!int_clk_sel, "internal clock deselect");

    // ---- fiducial 1: from the FIDO train ----
    clear_monitor();
    @(negedge clk); drop_pulse = 1'b1;
    wait (fid_edge > 0);
    t_start = fid_edge;
    // detector, 2-stage synchroniser, edge pulse, registered ECAC reset
    reset_edge = fid_edge + 3;
    while (!busy) @(negedge clk);
    camac(F_READ_REG, 4'd0, '0, r, q, x);
    check(!q && x, "command accepted during programming cycle");
    if (!q && x) mech[M_REJECT_CYCLE]++;
    while (busy) @(negedge clk);
    check(edge_no - t_start <= 96,
          $sformatf("programming took %0d clocks (12 us = 96 clocks at 8 MHz)", edge_no - t_start));
    $display("fiducial to outputs enabled: %0d clocks", edge_no - t_start);
    foreach (rows[c]) rows[c] = (mode[c] == 1) ? 8'h12 : (mode[c] == 2) ? 8'h34 :
                                (mode[c] == 3) ? 8'h56 : (mode[c] == 4) ? 8'd34 : 8'hFF;
    foreach (offset[c]) offset[c] = 0;
    check_pulses(reset_edge, rows, offset);
    mech[M_FID_FIDO]++;
    mech[M_PIR_ROWS]++;
    read_ok(F_READ_REG, 4'd0, r);
    check(r == 24'h9A7, $sformatf("pointer not restored: %h", r));
    if (r == 24'h9A7) mech[M_PTR_RESTORE]++;
    for (int a = 8; a <= 10; a++) begin
      read_ok(F_READ_REG, 4'(a), r);
      check(r == 24'hFF, $sformatf("PIR at A%0d not reset: %h", a, r));
    end
    read_ok(F_READ_REG, 4'd11, r);
    check(r == 24'd35, $sformatf("slot counter %0d", r));
    read_ok(F_READ_REG, 4'd2, r);
    check(r[0] && r[3], $sformatf("status %b", r[4:0]));

    // ---- fiducial 2: CAMAC F(25); CANDH freezes ECAC 1 for 50 clocks ----
    clear_monitor();
    // cmd_ok waits for the next falling edge, drives the command, which is
    // accepted at the following rising edge; the ECAC reset comes one later
    reset_edge = edge_no + 3;
    cmd_ok(F_FIDUCIAL, 4'd0, '0);
    camac(F_READ_REG, 4'd2, '0, r, q, x);
    if (!q && x) mech[M_REJECT_CYCLE]++;
    while (edge_no < reset_edge + 60) @(negedge clk);
    candh[1] = 1'b1;
    repeat (50) @(negedge clk);
    candh[1] = 1'b0;
    mech[M_CANDH]++;
    foreach (rows[c]) rows[c] = (mode[c] == 4) ? 8'd35 : 8'hFF;
    foreach (offset[c]) offset[c] = (c >= 8) ? 49 : 0;   // 50 edges, one step
    check_pulses(reset_edge, rows, offset);
    mech[M_FID_CAMAC]++;
    mech[M_STANDBY_ROW]++;
    read_ok(F_READ_REG, 4'd11, r);
    check(r == 24'd0, $sformatf("slot counter did not wrap: %0d", r));
    if (r == 24'd0) mech[M_TSC_WRAP]++;

    // ---- fiducial 3: FIDO again; CANDH + TEST1 on ECAC 0 ----
    clear_monitor();
    fid_edge = -1;
    @(negedge clk); drop_pulse = 1'b1;
    wait (fid_edge > 0);
    reset_edge = fid_edge + 3;
    while (edge_no < reset_edge + 60) @(negedge clk);
    candh[0] = 1'b1;                 // 20 edges: one step, plus 16 from TEST1
    repeat (8) @(negedge clk);
    test[0][0] = 1'b1;
    repeat (2) @(negedge clk);
    test[0][0] = 1'b0;
    repeat (10) @(negedge clk);
    candh[0] = 1'b0;
    mech[M_TEST]++;
    foreach (rows[c]) rows[c] = (mode[c] == 4) ? 8'd0 : 8'hFF;
    foreach (offset[c]) offset[c] = (c < 8) ? 3 : 0;     // 20 edges advance 1 + 16
    check_pulses(reset_edge, rows, offset);

    // ---- no more fiducials: missing-fiducial status ----
    read_ok(F_READ_REG, 4'd2, r);
    check(!r[1], "fiducial reported missing too early");
    while (edge_no < reset_edge + 3 * (1 << 17) + 10) @(negedge clk);
    read_ok(F_READ_REG, 4'd2, r);
    check(r[1] && fid_missing, $sformatf("timeout status %b", r[4:0]));
    if (r[1]) mech[M_TIMEOUT]++;
    cmd_ok(F_CLR_STATUS, 4'd2, '0);
    check(!fid_missing && !fid_seen, "status not cleared");

    #1 check(oclk == {2{clk}} && oclk_n == ~{2{clk}}, "backplane clock");
    foreach (mech[m]) begin
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("%-16s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
