// tb_tester_top: end-to-end test of the scan tester with the worked example
// (three 5-bit chains, four patterns, XRET-merged LUT pool) driving a
// behavioural die model.
//
// Checks:
//  * every bit shifted into every chain matches the care bits of the
//    original, unmerged pattern set (X bits may take either value);
//  * the signature equals one computed in software from the observed
//    stimulus, the die's capture function and a reference MISR;
//  * the timing: (patterns+1)*CHAIN_LEN shift clocks, one capture per
//    pattern, done one clock after the last unload;
//  * a fault-free run passes against the golden signature and a run with
//    a stuck-at fault in the die fails.
// It counts how often each mechanism occurred (die reset, pattern shift,
// capture, unload-only shift, compaction, reuse of one stored slice, pass,
// fail) and counts a failure for any that never happened.
module tb_tester_top;
  localparam int N = 3, L = 5, P = 4, R = 2, ML = N + 5;
  localparam logic [ML-1:0] TAPS = 8'b1011_1000;
  localparam logic [ML-1:0] GOLDEN_OK = 8'h84;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] so, si;
  logic se, arst, done, pass;
  logic fault_en;
  int unsigned fault_idx;

  tester_top #(.GOLDEN(GOLDEN_OK)) dut (
    .clk, .rst, .scan_out_i(so), .scan_en_o(se), .asic_rst_o(arst),
    .scan_in_o(si), .test_done_o(done), .test_pass_o(pass));

  scan_die_model #(.N_CHAINS(N), .CHAIN_LEN(L)) die (
    .clk, .rst(rst | arst), .se, .si, .fault_en, .fault_idx, .so);

  // Original pattern set, pattern-major, chain 1..3; leftmost bit first.
  string pat [P][N] = '{'{"01XX1", "100X0", "XX1X1"},
                        '{"1XX11", "11XX1", "110XX"},
                        '{"X0XX0", "1X001", "1X0XX"},
                        '{"XX11X", "101XX", "X1XX1"}};

  // ---- mechanism counters ----
  int n_asic_rst, n_shift_load, n_capture, n_unload, n_compact, n_reuse, n_pass, n_fail;

  // ---- software reference ----
  logic [N*L-1:0] sw_s;
  logic [ML-1:0]  sw_sig;
  logic [L-1:0]   stim [P][N];

  function automatic logic [N*L-1:0] capture(logic [N*L-1:0] s, bit f, int unsigned fi);
    logic [N*L-1:0] n;
    for (int i = 0; i < N*L; i++)
      n[i] = (f && i == fi) ? 1'b0 : s[i] ^ s[(i+5) % (N*L)] ^ (s[(i+1) % (N*L)] & ~s[(i+2) % (N*L)]);
    return n;
  endfunction

  function automatic logic [ML-1:0] misr_step(logic [ML-1:0] q, logic [N-1:0] d);
    logic fb = ~(q[7] ^ q[5] ^ q[4] ^ q[3]);  // taps 8,6,5,4
    logic [ML-1:0] n = {q[ML-2:0], fb};
    for (int k = 0; k < N; k++) n[k] ^= d[k];
    return n;
  endfunction

  task automatic run_test(input bit with_fault, input int unsigned fidx);
    int cyc = 0, t_first_se = -1, run_idx = 0, bitpos = 0, n_se = 0, n_cap = 0;
    bit in_shift = 0, have_resp = 0;
    fault_en = with_fault; fault_idx = fidx;
    rst = 1; sw_s = '0; sw_sig = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    while (!done && cyc < 1000) begin
      // sample the die interface before the rising edge
      if (arst) begin
        n_asic_rst++; sw_s = '0;
      end else if (se) begin
        if (t_first_se < 0) t_first_se = cyc;
        n_se++;
        if (!in_shift) begin in_shift = 1; bitpos = 0; end
        if (have_resp) begin
          logic [N-1:0] ob;
          for (int c = 0; c < N; c++) ob[c] = sw_s[c*L + L - 1];
          checks++;
          if (ob != so) begin failures++; $display("FAIL scan-out model mismatch cycle %0d", cyc); end
          sw_sig = misr_step(sw_sig, ob);
          n_compact++;
        end
        if (run_idx < P) begin
          n_shift_load++;
          for (int c = 0; c < N; c++) begin
            automatic byte ch = pat[run_idx][c][bitpos];
            stim[run_idx][c][bitpos] = si[c];
            checks++;
            if (ch != "X" && si[c] != (ch == "1")) begin
              failures++;
              $display("FAIL pattern %0d chain %0d bit %0d: got %b want %c", run_idx + 1, c + 1, bitpos, si[c], ch);
            end
          end
        end else n_unload++;
        for (int c = 0; c < N; c++)
          for (int k = L - 1; k >= 0; k--)
            sw_s[c*L + k] = (k == 0) ? si[c] : sw_s[c*L + k - 1];
        bitpos++;
      end else if (in_shift) begin
        // first clock with scan enable low after a shift: capture
        in_shift = 0;
        checks++;
        if (bitpos != L) begin failures++; $display("FAIL shift length %0d", bitpos); end
        if (run_idx < P) begin
          n_capture++; n_cap++;
          sw_s = capture(sw_s, with_fault, fidx);
          have_resp = 1;
        end
        run_idx++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); end
    checks++;
    if (cyc - t_first_se != P*(L+1) + L + 1) begin
      failures++; $display("FAIL test length %0d, expected %0d", cyc - t_first_se, P*(L+1) + L + 1);
    end
    checks++; if (n_se != (P+1)*L) begin failures++; $display("FAIL shift clocks %0d", n_se); end
    checks++; if (n_cap != P) begin failures++; $display("FAIL captures %0d", n_cap); end
    checks++;
    if (dut.u_misr.sig_o != sw_sig) begin
      failures++; $display("FAIL signature %h, model %h", dut.u_misr.sig_o, sw_sig);
    end
    checks++;
    if (pass != (sw_sig == GOLDEN_OK)) begin failures++; $display("FAIL verdict"); end
    $display("run fault=%0d signature %h pass=%0d", with_fault, sw_sig, pass);
    if (pass) n_pass++; else n_fail++;
    // the result must hold
    repeat (5) @(negedge clk);
    checks++; if (!done || pass != (sw_sig == GOLDEN_OK)) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    fault_en = 0; fault_idx = 0;
    run_test(0, 0);
    checks++; if (!pass) begin failures++; $display("FAIL fault-free run did not pass"); end
    // slice reuse: identical stimulus applied twice (stored once)
    for (int a = 0; a < P*N; a++)
      for (int b = a + 1; b < P*N; b++)
        if (stim[a / N][a % N] == stim[b / N][b % N]) n_reuse++;
    run_test(1, 7);
    checks++; if (pass) begin failures++; $display("FAIL faulty die passed"); end
    $display("mechanisms: asic_rst=%0d shift_load=%0d capture=%0d unload=%0d compact=%0d reuse=%0d pass=%0d fail=%0d",
             n_asic_rst, n_shift_load, n_capture, n_unload, n_compact, n_reuse, n_pass, n_fail);
    checks++; if (n_asic_rst == 0)   failures++;
    checks++; if (n_shift_load == 0) failures++;
    checks++; if (n_capture == 0)    failures++;
    checks++; if (n_unload == 0)     failures++;
    checks++; if (n_compact == 0)    failures++;
    checks++; if (n_reuse == 0)      failures++;
    checks++; if (n_pass == 0)       failures++;
    checks++; if (n_fail == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
