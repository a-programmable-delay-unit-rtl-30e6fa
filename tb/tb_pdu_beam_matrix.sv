// tb_pdu_beam_matrix: runs the PDU at full size through a whole timing table.
//
// 1. Fills all 4096 table words over CAMAC with distinct delays
//    dly(row, ch) = 60 + ((16*row + ch) * 37) mod 1800, as 256 row writes of
//    16 auto-incrementing commands, then reads the whole table back in one
//    auto-incrementing sweep (the pointer wraps from FFF to 000).
// 2. Puts every channel in slot-counter mode and fires 36 fiducials: each
//    must use row 0, 1, ..., 35 in turn, then row 0 again.
// 3. Puts channels in the three pattern-register modes and fires 86
//    fiducials, writing PIR1-3 before each so that together they walk rows
//    0..255: every row of the table drives an output at least once.
// Every pulse position is checked to the clock against the table formula and
// every pulse width against eight clocks. Fiducials alternate between the
// FIDO train (a missing pulse) and the CAMAC command.
`timescale 1ns/1ps
module tb_pdu_beam_matrix;
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
  int          edge_no = 0;
  bit          drop_pulse = 1'b0;
  int          fid_edge = -1;
  int          rise_edge [16];
  int          width [16];
  logic [15:0] out_prev = '0;
  bit          row_used [256];
  int unsigned fid_fido = 0, fid_camac = 0;

  pdu_top dut (.*);

  assign clk = fido;

  // FIDO train and its inverted copy 7 ns later (as in tb_pdu_top)
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

  always begin
    @(negedge clk);
    #1;
    for (int c = 0; c < 16; c++) begin
      if (out[c] && !out_prev[c] && rise_edge[c] < 0) rise_edge[c] = edge_no;
      if (out[c]) width[c]++;
    end
    out_prev = out;
  end

  initial begin
    #60_000_000;
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

  function automatic int dly(int row, int ch);
    return 60 + ((16 * row + ch) * 37) % 1800;
  endfunction

  task automatic camac(input logic [4:0] f, input logic [3:0] a, input logic [23:0] w,
                       output logic [23:0] r, output logic q);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{f: f, a: a, w: w};
    @(negedge clk);
    cmd_valid = 1'b0;
    for (int i = 0; i < 4 && !rsp_valid; i++) @(negedge clk);
    r = rsp.r; q = rsp.q && rsp.x && rsp_valid;
  endtask

  task automatic cmd_ok(input logic [4:0] f, input logic [3:0] a, input logic [23:0] w);
    logic [23:0] r;
    logic q;
    camac(f, a, w, r, q);
    check(q, $sformatf("F%0d A%0d not accepted", f, a));
  endtask

  // Fire one fiducial (from FIDO or CAMAC) and check all 16 pulses against
  // the rows each channel should use.
  task automatic fire(bit from_camac, int rows [16]);
    int reset_edge, exp_edge;
    foreach (rise_edge[c]) begin rise_edge[c] = -1; width[c] = 0; end
    if (from_camac) begin
      reset_edge = edge_no + 3;      // see tb_pdu_top
      cmd_ok(F_FIDUCIAL, 4'd0, '0);
      fid_camac++;
    end else begin
      fid_edge = -1;
      @(negedge clk); drop_pulse = 1'b1;
      wait (fid_edge > 0);
      reset_edge = fid_edge + 3;
      fid_fido++;
    end
    while (edge_no < reset_edge + 1900) @(negedge clk);
    for (int c = 0; c < 16; c++) begin
      exp_edge = reset_edge + dly(rows[c], c);
      check(rise_edge[c] == exp_edge,
            $sformatf("row %0d ch %0d: pulse at %0d, expected %0d", rows[c], c, rise_edge[c], exp_edge));
      check(width[c] == 8, $sformatf("row %0d ch %0d: width %0d", rows[c], c, width[c]));
      row_used[rows[c]] = 1'b1;
    end
  endtask

  initial begin
    logic [23:0] r;
    logic q;
    int rows [16];
    int n, unused;
    rst = 1'b1; cmd_valid = 1'b0; cmd = '0; candh = '0; test = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    while (busy) @(negedge clk);

    // 1. whole table
    cmd_ok(F_WRITE_REG, 4'd0, 24'h000);
    for (int row = 0; row < 256; row++)
      for (int c = 0; c < 16; c++) cmd_ok(F_WRITE_PTT, 4'd0, 24'(dly(row, c)));
    camac(F_READ_REG, 4'd0, '0, r, q);
    check(q && r == 24'h000, $sformatf("pointer after full table: %h", r));
    for (int i = 0; i < 4096; i++) begin
      camac(F_READ_PTT, 4'd0, '0, r, q);
      check(q && r == 24'(dly(i / 16, i % 16)), $sformatf("word %h: %h", i, r));
    end

    // 2. 36 time slots, all channels on the slot counter
    for (int c = 0; c < 16; c++) begin
      cmd_ok(F_WRITE_REG, 4'd0, 24'(c));
      cmd_ok(F_WRITE_REG, 4'd1, 24'(W_TSC));
    end
    cmd_ok(F_WRITE_PIR, 4'd11, 24'd0);
    for (int slot = 0; slot <= 36; slot++) begin
      foreach (rows[c]) rows[c] = slot % 36;
      fire(slot % 2 == 1, rows);
    end

    // 3. pattern registers walk the 256 rows
    for (int c = 0; c < 16; c++) begin
      cmd_ok(F_WRITE_REG, 4'd0, 24'(c));
      cmd_ok(F_WRITE_REG, 4'd1, 24'(c % 3 + 1));     // PIR1, PIR2, PIR3
    end
    n = 0;
    for (int f = 0; f < 86; f++) begin
      int pir [3];
      for (int k = 0; k < 3; k++) begin
        pir[k] = (3 * f + k) % 256;
        cmd_ok(F_WRITE_PIR, 4'(8 + k), 24'(pir[k]));
      end
      foreach (rows[c]) rows[c] = pir[c % 3];
      fire(f % 2 == 0, rows);
      // the registers have fallen back to the standby row
      camac(F_READ_REG, 4'd8, '0, r, q);
      check(r == 24'hFF, "PIR1 not reset to standby");
    end

    unused = 0;
    foreach (row_used[i]) if (!row_used[i]) unused++;
    check(unused == 0, $sformatf("%0d table rows never used", unused));
    check(fid_fido > 0 && fid_camac > 0, "both fiducial sources used");
    $display("fiducials: %0d from FIDO, %0d from CAMAC; rows used: %0d of 256",
             fid_fido, fid_camac, 256 - unused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
