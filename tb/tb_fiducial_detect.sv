// tb_fiducial_detect: drives the detector with a 119 MHz pulse train
// (8.4 ns period, 4.2 ns high) in which chosen pulses are missing, and models
// the external 7 ns delay line as a second copy of the train, inverted and
// 7 ns late.
// Checks that the detector output is high right after each missing pulse,
// low a period after the train resumes, and never high otherwise.
`timescale 1ns/1ps
module tb_fiducial_detect;
  logic fido = 1'b0, fido_dly_n = 1'b1, fid_det;
  int unsigned checks = 0, failures = 0, detections = 0;
  bit missing [400];

  initial begin
    foreach (missing[p]) missing[p] = (p == 20 || p == 100 || p == 237 || p == 333);
  end

  fiducial_detect dut (.fido, .fido_dly_n, .fid_det);

  // The delay line's output is the same train, inverted, 7 ns later.
  initial begin
    #7.0;
    for (int p = 0; p < 400; p++) begin
      fido_dly_n = missing[p];
      #4.2;
      fido_dly_n = 1'b1;
      #4.2;
    end
  end

  initial begin
    #100_000;
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
    for (int p = 0; p < 400; p++) begin
      // period p: first half high unless the pulse is missing
      fido = !missing[p];
      #3.5;
      // the flip-flop samples 7 ns after each fall, 2.8 ns into a period;
      // a missing pulse in period m makes fid_det high in periods m and m+1
      if (p > 2) begin
        check(fid_det == (missing[p] || missing[p-1]),
              $sformatf("period %0d: fid_det=%b", p, fid_det));
        if (missing[p]) begin
          check(fid_det, $sformatf("period %0d: fiducial not seen", p));
          if (fid_det) detections++;
        end
        if (p > 1 && missing[p-2]) check(!fid_det, "fid_det stuck high");
      end
      #0.7;
      fido = 1'b0;
      #4.2;
    end
    check(detections == 4, $sformatf("%0d detections", detections));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
