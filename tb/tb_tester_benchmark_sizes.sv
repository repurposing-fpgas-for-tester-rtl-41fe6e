// tb_tester_benchmark_sizes: the scan tester at the sizes of three benchmark
// circuits, each run end to end with hash-generated contents (see
// tester_hash_env). All chains are 32 bits long.
//
//   Color:  29 chains,  91 patterns, 1182 LUTs,  91-input muxes,  34-bit MISR, taps 1,2,27,34
//   fm:     18 chains, 365 patterns, 2074 LUTs, 256-input muxes,  23-bit MISR, taps 18,23
//   fpu:   172 chains, 254 patterns, 1387 LUTs, 128-input muxes, 177-bit MISR, taps 172,174,175,177
//
// The LUT counts are the merged pool sizes of the real pattern sets (LUT
// bits / 32). The mux sizes are this testbench's choice: at least the
// average select width per chain of the real sets, and never more inputs
// than the chain has patterns. The three instances run in parallel; the
// watchdog covers the longest, fm, at 365*33+33 clocks plus margin.
module tb_tester_benchmark_sizes;
  logic clk = 0, start = 0;
  always #5 clk = ~clk;

  logic f0, f1, f2;
  int   c0, c1, c2, x0, x1, x2, k0, k1, k2;

  tester_hash_env #(.N(29), .P(91), .NL(1182), .MI(91), .ML(34),
                    .TAPS((34'(1) << 0) | (34'(1) << 1) | (34'(1) << 26) | (34'(1) << 33)), .SEED(3)) u_color (
    .clk, .start, .finished(f0), .checks(c0), .failures(x0), .clocks(k0));
  tester_hash_env #(.N(18), .P(365), .NL(2074), .MI(256), .ML(23),
                    .TAPS((23'(1) << 17) | (23'(1) << 22)), .SEED(5)) u_fm (
    .clk, .start, .finished(f1), .checks(c1), .failures(x1), .clocks(k1));
  tester_hash_env #(.N(172), .P(254), .NL(1387), .MI(128), .ML(177),
                    .TAPS((177'(1) << 171) | (177'(1) << 173) | (177'(1) << 174) | (177'(1) << 176)), .SEED(7)) u_fpu (
    .clk, .start, .finished(f2), .checks(c2), .failures(x2), .clocks(k2));

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    start = 1;
    wait (f0 && f1 && f2);
    checks = c0 + c1 + c2;
    failures = x0 + x1 + x2;
    $display("test lengths: Color %0d, fm %0d, fpu %0d clocks", k0, k1, k2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (14000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
