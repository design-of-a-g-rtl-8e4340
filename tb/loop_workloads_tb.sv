// loop_workloads_tb: the nested-loop workloads used to evaluate the predictor.
//
//  * "for i<100 { for j<3 }" (correlated inner/outer branches),
//  * "for i<100 { br_1++; for j<4 br_2++; }" (500 branches),
// each run on the conventional G-share (PHT read with the resolved GHR) and on
// the enhanced G-share (PHT read with the speculative fetch GHR), and the
// second loop once more with its outer branch behind two LERI prefixes, on the
// default 6-bit G-share and on the 5-bit (32-entry PHT) and 7-bit (128-entry
// PHT) configurations.
// Checks: every branch executes; the enhanced predictor stays below 5% misses
// on every run and does not do worse than the conventional one; the LERI-
// prefixed run is predicted as well as the plain one; decoded PCs are right.
module loop_workloads_tb;
  bit d0, d1, d2, d3, d4, d5, d6;
  int b0, b1, b2, b3, b4, b5, b6, m0, m1, m2, m3, m4, m5, m6, e0, e1, e2, e3, e4, e5, e6;
  int checks = 0, failures = 0;

  loop_runner #(.SPEC_GHR(1'b0), .INNER(3)) u_conv3 (d0, b0, m0, e0);
  loop_runner #(.SPEC_GHR(1'b1), .INNER(3)) u_enh3  (d1, b1, m1, e1);
  loop_runner #(.SPEC_GHR(1'b0), .INNER(4)) u_conv4 (d2, b2, m2, e2);
  loop_runner #(.SPEC_GHR(1'b1), .INNER(4)) u_enh4  (d3, b3, m3, e3);
  loop_runner #(.SPEC_GHR(1'b1), .INNER(4), .LERI_OUTER(1'b1)) u_enh4l (d4, b4, m4, e4);
  loop_runner #(.PHT_ENTRIES(32), .INNER(4), .LERI_OUTER(1'b1)) u_enh4l_5b (d5, b5, m5, e5);
  loop_runner #(.PHT_ENTRIES(128), .INNER(4), .LERI_OUTER(1'b1)) u_enh4l_7b (d6, b6, m6, e6);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2 && d3 && d4 && d5 && d6);
    $display("j<3 loop: conventional %0d/%0d misses (%0.2f%%), enhanced %0d/%0d (%0.2f%%)",
             m0, b0, 100.0 * m0 / b0, m1, b1, 100.0 * m1 / b1);
    $display("j<4 loop: conventional %0d/%0d misses (%0.2f%%), enhanced %0d/%0d (%0.2f%%)",
             m2, b2, 100.0 * m2 / b2, m3, b3, 100.0 * m3 / b3);
    $display("j<4 loop, outer branch behind LERIs: enhanced %0d/%0d (%0.2f%%)",
             m4, b4, 100.0 * m4 / b4);
    $display("same, 5-bit G-share %0d/%0d (%0.2f%%), 7-bit G-share %0d/%0d (%0.2f%%)",
             m5, b5, 100.0 * m5 / b5, m6, b6, 100.0 * m6 / b6);
    check(b0 == 400 && b1 == 400, "j<3 loop executes 400 branches");
    check(b2 == 500 && b3 == 500 && b4 == 500 && b5 == 500 && b6 == 500,
          "j<4 loop executes 500 branches");
    check(e0 + e1 + e2 + e3 + e4 + e5 + e6 == 0, "decoded actual PCs");
    check(m5 * 20 < b5 && m6 * 20 < b6, "5-bit and 7-bit G-share below 5%");
    check(m1 * 20 < b1, "enhanced G-share below 5% on the j<3 loop");
    check(m3 * 20 < b3, "enhanced G-share below 5% on the j<4 loop");
    check(m4 * 20 < b4, "enhanced G-share below 5% with a LERI-prefixed branch");
    check(m1 <= m0 && m3 <= m2, "enhanced no worse than conventional");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
