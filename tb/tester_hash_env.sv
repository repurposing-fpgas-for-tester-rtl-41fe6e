// tester_hash_env: one scan tester at a given benchmark size, with its LUT
// pool, mux wiring and select RAM filled from a fixed hash instead of a
// merged pattern set, so that sizes far beyond an elaboration-time merge can
// be simulated. Parameters: N chains of L bits, P patterns, a pool of NL
// LUTs, MI inputs per chain mux, an ML-bit MISR with feedback taps TAPS, and
// SEED to vary the contents between instances.
//
// The expected stimulus of chain c in pattern p is
// LUT_INIT[MUX_MAP[c][SEL_INIT[p][c]]], computed here from the same arrays.
// The environment drives a behavioural die, checks every shifted bit
// against that formula and every unloaded bit against a software model of
// the die, and compares the final signature with a software MISR. It also
// checks the test length, P*(L+1)+L+1 clocks from the first shift to done,
// and the number of shift, capture and unload clocks.
//
// Interface: the run starts when start rises (the tester's reset is then
// released). finished rises at the end; checks, failures and clocks (the
// measured test length) are valid from then on.
module tester_hash_env #(
  parameter int              N    = 172,
  parameter int              L    = 32,
  parameter int              P    = 254,
  parameter int              NL   = 1387,
  parameter int              MI   = 128,
  parameter int              ML   = N + 5,
  parameter logic [ML-1:0]   TAPS = '0,
  parameter int unsigned     SEED = 1
) (
  input  logic clk,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   clocks
);
  localparam int SW  = (MI > 1) ? $clog2(MI) : 1;
  localparam int LIW = (NL > 1) ? $clog2(NL) : 1;

  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16); x = x * 32'h7feb352d;
    x = x ^ (x >> 15); x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [NL-1:0][L-1:0] mk_luts();
    for (int l = 0; l < NL; l++) mk_luts[l] = L'(mix(32'(l) * 3 + 17 + SEED * 32'h9e3779b9));
  endfunction
  function automatic logic [N-1:0][MI-1:0][LIW-1:0] mk_map();
    for (int c = 0; c < N; c++)
      for (int k = 0; k < MI; k++) mk_map[c][k] = LIW'(mix(32'(c * MI + k) * 5 + 3 + SEED) % NL);
  endfunction
  function automatic logic [P-1:0][N-1:0][SW-1:0] mk_sel();
    for (int p = 0; p < P; p++)
      for (int c = 0; c < N; c++) mk_sel[p][c] = SW'(mix(32'(p * N + c) * 7 + 1 + SEED) % MI);
  endfunction

  localparam logic [NL-1:0][L-1:0]          LUTS = mk_luts();
  localparam logic [N-1:0][MI-1:0][LIW-1:0] MAP  = mk_map();
  localparam logic [P-1:0][N-1:0][SW-1:0]   SEL  = mk_sel();

  logic rst = 1;
  logic [N-1:0] so, si;
  logic se, arst, done, pass;

  tester_top #(.N_CHAINS(N), .LUT_DEPTH(L), .N_PATTERNS(P), .N_LUTS(NL), .MUX_IN(MI),
               .LUT_INIT(LUTS), .MUX_MAP(MAP), .SEL_INIT(SEL), .MISR_LEN(ML), .MISR_TAPS(TAPS)) dut (
    .clk, .rst, .scan_out_i(so), .scan_en_o(se), .asic_rst_o(arst),
    .scan_in_o(si), .test_done_o(done), .test_pass_o(pass));

  scan_die_model #(.N_CHAINS(N), .CHAIN_LEN(L)) die (
    .clk, .rst(rst | arst), .se, .si, .fault_en(1'b0), .fault_idx(0), .so);

  localparam int SM = N * L;
  logic [SM-1:0] sw_s;
  logic [ML-1:0] sw_sig;

  function automatic logic [SM-1:0] capture(logic [SM-1:0] s);
    logic [SM-1:0] n;
    for (int i = 0; i < SM; i++) n[i] = s[i] ^ s[(i+5) % SM] ^ (s[(i+1) % SM] & ~s[(i+2) % SM]);
    return n;
  endfunction

  function automatic logic [ML-1:0] misr_step(logic [ML-1:0] q, logic [N-1:0] d);
    logic [ML-1:0] n = {q[ML-2:0], ~^(q & TAPS)};
    for (int k = 0; k < N; k++) n[k] ^= d[k];
    return n;
  endfunction

  initial begin
    automatic int cyc = 0, t_first_se = -1, run_idx = 0, bitpos = 0, n_se = 0, n_cap = 0, n_unload = 0;
    automatic bit in_shift = 0, have_resp = 0;
    finished = 0; checks = 0; failures = 0; clocks = 0;
    sw_s = '0; sw_sig = '0;
    wait (start);
    repeat (3) @(negedge clk);
    rst = 0;
    while (!done && cyc < P * (L + 8) + 200) begin
      if (arst) sw_s = '0;
      else if (se) begin
        if (t_first_se < 0) t_first_se = cyc;
        n_se++;
        if (!in_shift) begin in_shift = 1; bitpos = 0; end
        if (have_resp) begin
          logic [N-1:0] ob;
          for (int c = 0; c < N; c++) ob[c] = sw_s[c*L + L - 1];
          checks++;
          if (ob != so) begin failures++; $display("FAIL %0d chains: scan-out mismatch cycle %0d", N, cyc); end
          sw_sig = misr_step(sw_sig, ob);
        end
        if (run_idx < P) begin
          logic [N-1:0] exp_si;
          for (int c = 0; c < N; c++) exp_si[c] = LUTS[MAP[c][SEL[run_idx][c]]][bitpos];
          checks++;
          if (si != exp_si) begin failures++; $display("FAIL %0d chains: pattern %0d bit %0d", N, run_idx, bitpos); end
        end else n_unload++;
        for (int c = 0; c < N; c++)
          for (int k = L - 1; k >= 0; k--)
            sw_s[c*L + k] = (k == 0) ? si[c] : sw_s[c*L + k - 1];
        bitpos++;
      end else if (in_shift) begin
        in_shift = 0;
        checks++;
        if (bitpos != L) begin failures++; $display("FAIL %0d chains: shift length %0d", N, bitpos); end
        if (run_idx < P) begin
          n_cap++;
          sw_s = capture(sw_s);
          have_resp = 1;
        end
        run_idx++;
      end
      @(negedge clk);
      cyc++;
    end
    clocks = cyc - t_first_se;
    checks++; if (!done) begin failures++; $display("FAIL %0d chains: no done", N); end
    checks++;
    if (clocks != P*(L+1) + L + 1) begin failures++; $display("FAIL %0d chains: test length %0d", N, clocks); end
    checks++; if (n_se != (P+1)*L) begin failures++; $display("FAIL %0d chains: shift clocks %0d", N, n_se); end
    checks++; if (n_cap != P) begin failures++; $display("FAIL %0d chains: captures %0d", N, n_cap); end
    checks++; if (n_unload != L) begin failures++; $display("FAIL %0d chains: unload clocks %0d", N, n_unload); end
    checks++; if (dut.u_misr.sig_o != sw_sig) begin failures++; $display("FAIL %0d chains: signature", N); end
    checks++; if (pass != (sw_sig == '0)) begin failures++; $display("FAIL %0d chains: verdict", N); end
    $display("%0d chains x %0d patterns, %0d LUTs, %0d-input muxes, %0d-bit MISR: %0d clocks from first shift to done, signature %h",
             N, P, NL, MI, ML, clocks, sw_sig);
    finished = 1;
  end
endmodule
