// tb_se_gen: drives the sequencer with reference bit, segment and pattern
// counters and compares every control word and RAM-advance pulse with the
// expected sequence: die reset, then per pattern S*L shift clocks and one
// capture clock (compaction from the second pattern on), S*L unload clocks,
// one check clock, then idle. Run for the default one-segment chains
// (L=5, S=1, 4 patterns) and for two-segment chains (L=4, S=2, 3 patterns).
module tb_se_gen;
  import tester_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int R = 2;
  int L, S, N;
  scan_ctl_t ctl, expq [$];
  logic expr [$];
  logic lut_en, ram_en;
  int bitc, segc, patc;
  phase_e ph;

  se_gen #(.ASIC_RST_CYCLES(R)) dut (.clk, .rst, .lut_last_i(bitc == L - 1), .seg_last_i(segc == S - 1),
                                     .pat_last_i(patc == N - 1),
                                     .ctl_o(ctl), .lut_en_o(lut_en), .ram_en_o(ram_en), .phase_o(ph));

  always_ff @(posedge clk) begin
    if (rst) begin bitc <= 0; segc <= 0; patc <= 0; end
    else begin
      if (lut_en) bitc <= (bitc == L - 1) ? 0 : bitc + 1;
      if (ram_en) begin
        segc <= (segc == S - 1) ? 0 : segc + 1;
        if (segc == S - 1) patc <= (patc == N - 1) ? 0 : patc + 1;
      end
    end
  end

  function automatic scan_ctl_t w(logic r, logic se, logic ld, logic cp, logic ck);
    return '{asic_rst: r, se: se, load: ld, compact: cp, check: ck};
  endfunction

  task automatic run(int l, int s, int n);
    L = l; S = s; N = n;
    expq.delete(); expr.delete();
    repeat (R) begin expq.push_back(w(1, 0, 0, 0, 0)); expr.push_back(0); end
    for (int p = 0; p < N; p++) begin
      for (int i = 0; i < S*L; i++) begin
        expq.push_back(w(0, 1, 1, p > 0, 0));
        expr.push_back(i % L == L - 1 && i != S*L - 1);
      end
      expq.push_back(w(0, 0, 0, 0, 0)); expr.push_back(1);
    end
    for (int i = 0; i < S*L; i++) begin
      expq.push_back(w(0, 1, 0, 1, 0)); expr.push_back(i % L == L - 1 && i != S*L - 1);
    end
    expq.push_back(w(0, 0, 0, 0, 1)); expr.push_back(0);
    repeat (10) begin expq.push_back(w(0, 0, 0, 0, 0)); expr.push_back(0); end

    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (expq[i]) begin
      checks++;
      if (ctl != expq[i] || ram_en != expr[i]) begin
        failures++; $display("FAIL L=%0d S=%0d cycle %0d: got %b/%b exp %b/%b", L, S, i, ctl, ram_en, expq[i], expr[i]);
      end
      @(negedge clk);
    end
    checks++; if (ph != PH_DONE) begin failures++; $display("FAIL not done"); end
  endtask

  initial begin
    run(5, 1, 4);
    run(4, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
