// tb_tester_workloads: the scan tester at the sizes of the benchmark
// circuits quad (6 chains, 40 patterns, 11-bit MISR with taps 9,11) and
// des56 (14 chains, 120 patterns, 19-bit MISR with taps 1,2,6,19), all with
// 32-bit chains. Pattern sets are synthetic (see tester_workload_env); each
// is merged with XRET, loaded into a tester and checked end to end. A third
// run uses 64-bit chains (two 32-bit LUT segments per chain, 4 chains,
// 12 patterns, 9-bit MISR with taps 9,5) so that each pattern needs two
// select values per chain. The quad-sized set is also merged with ADJCOM
// (adjacent fill first): it must need at least as many LUTs as XRET and
// toggle the scan inputs no more often inside a slice, since adjacent fill
// gives the fewest transitions that the care bits allow.
module tb_tester_workloads;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;

  logic f0, f1, f2, f3;
  int c0, c1, c2, c3, x0, x1, x2, x3, l0, l1, l2, l3, cap0, cap1, cap2, cap3;
  int u0, u1, u2, u3, r0, r1, r2, r3, t0, t1, t2, t3;

  tester_workload_env #(.N_CH(6), .N_PAT(40), .CARE_PCT(20), .SEED(11), .ML(11),
                        .TAPS(11'b101_0000_0000)) quad (
    .clk, .start, .finished(f0), .checks(c0), .failures(x0), .n_luts_o(l0),
    .n_capture(cap0), .n_unload(u0), .n_reuse(r0), .n_toggle(t0));

  tester_workload_env #(.N_CH(6), .N_PAT(40), .CARE_PCT(20), .SEED(11), .ML(11),
                        .TAPS(11'b101_0000_0000), .ADJCOM(1)) quad_adj (
    .clk, .start, .finished(f3), .checks(c3), .failures(x3), .n_luts_o(l3),
    .n_capture(cap3), .n_unload(u3), .n_reuse(r3), .n_toggle(t3));

  tester_workload_env #(.N_CH(14), .N_PAT(120), .CARE_PCT(20), .SEED(56), .ML(19),
                        .TAPS(19'b100_0000_0000_0010_0011)) des56 (
    .clk, .start, .finished(f1), .checks(c1), .failures(x1), .n_luts_o(l1),
    .n_capture(cap1), .n_unload(u1), .n_reuse(r1), .n_toggle(t1));

  tester_workload_env #(.N_CH(4), .N_PAT(12), .N_SEGS(2), .CARE_PCT(20), .SEED(64), .ML(9),
                        .TAPS(9'b1_0001_0000)) seg2 (
    .clk, .start, .finished(f2), .checks(c2), .failures(x2), .n_luts_o(l2),
    .n_capture(cap2), .n_unload(u2), .n_reuse(r2), .n_toggle(t2));

  initial begin
    #1 start = 1;
    wait (f0 && f1 && f2 && f3);
    checks = c0 + c1 + c2 + c3; failures = x0 + x1 + x2 + x3;
    // every mechanism must have occurred in each run
    checks++; if (cap0 == 0 || cap1 == 0 || cap2 == 0 || cap3 == 0) failures++;
    checks++; if (u0 == 0 || u1 == 0 || u2 == 0 || u3 == 0) failures++;
    checks++; if (r0 <= 0 || r1 <= 0 || r2 <= 0 || r3 <= 0) begin failures++; $display("FAIL no LUT sharing"); end
    checks++; if (l3 < l0) begin failures++; $display("FAIL ADJCOM used fewer LUTs than XRET"); end
    checks++; if (t3 > t0) begin failures++; $display("FAIL ADJCOM toggles more than XRET"); end
    $display("quad-sized set: XRET %0d LUTs, %0d toggles; ADJCOM %0d LUTs, %0d toggles", l0, t0, l3, t3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
