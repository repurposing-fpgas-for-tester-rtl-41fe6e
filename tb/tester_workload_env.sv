// tester_workload_env: runs the scan tester on one benchmark-sized
// workload (testbench only).
//
// A pattern set of N_PAT patterns for N_CH chains of N_SEGS*32 bits (each
// chain cut into N_SEGS 32-bit slices, one LUT each) is generated
// with a fixed hash: each bit is a care bit with probability CARE_PCT %, its
// value pseudo-random; the rest are don't-cares. At elaboration the
// X-retaining merge (XRET), or with ADJCOM set the adjacent-fill merge
// (each slice is adjacent-filled first, so only identical slices share),
// runs on this set in chain order (then pattern,
// then segment): each slice goes
// into the first pool LUT it is compatible with (no care bit in conflict),
// which then takes the slice's care bits, or else into a new LUT; the chain's
// mux reuses an input already wired to that LUT or gains a new one, and the
// slice's select value records that input. Remaining don't-cares are filled
// from the adjacent bit. The resulting pool, wiring and select table
// parametrize a tester_top instance, which drives a behavioural die.
//
// At run time every shifted bit is checked against the care bits of the
// original (unmerged) pattern, the signature against a software model of
// die and MISR, and the shift/capture counts and test length against
// N_PAT*(C+1)+C+1 clocks for chain length C. Results leave through the output ports.
module tester_workload_env #(
  parameter int          N_CH     = 6,
  parameter int          N_PAT    = 40,
  parameter int          N_SEGS   = 1,
  parameter int          CARE_PCT = 20,
  parameter int unsigned SEED     = 1,
  parameter bit          ADJCOM   = 0,  // 1: adjacent fill before merging
  parameter int          ML       = N_CH + 5,
  parameter logic [ML-1:0] TAPS   = '0
) (
  input  logic clk,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_luts_o,
  output int   n_capture,
  output int   n_unload,
  output int   n_reuse,
  output int   n_toggle
);
  localparam int L  = 32;
  localparam int C  = N_SEGS * L;
  localparam int NE = N_PAT * N_SEGS;
  localparam int NS = N_CH * NE;
  localparam int IW = $clog2(NS + 1);

  // ---------------- pattern generator ----------------
  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16); x = x * 32'h7feb352d;
    x = x ^ (x >> 15); x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [L-1:0] pat_care(int p, int c);  // p = slice row: pattern*N_SEGS+segment
    logic [L-1:0] r;
    for (int b = 0; b < L; b++)
      r[b] = (mix(SEED * 32'h9e3779b9 + 32'(p * 4099 + c * 131 + b) * 2) % 100) < 32'(CARE_PCT);
    return r;
  endfunction

  function automatic logic [L-1:0] pat_val(int p, int c);
    logic [L-1:0] r;
    for (int b = 0; b < L; b++)
      r[b] = mix(SEED * 32'h85ebca6b + 32'(p * 4099 + c * 131 + b) * 2 + 1) % 2 == 1;
    return r & pat_care(p, c);
  endfunction

  // Adjacent fill: a don't-care takes the value of the bit before it;
  // leading don't-cares take the first care bit; an all-X slice is 0.
  function automatic logic [L-1:0] adj_fill(logic [L-1:0] v, logic [L-1:0] cr);
    logic [L-1:0] r = v & cr;
    int first = -1;
    for (int b = 0; b < L; b++) if (first < 0 && cr[b]) first = b;
    for (int b = 0; b < L; b++)
      if (!cr[b]) r[b] = (first < 0) ? 1'b0 : (b < first) ? r[first] : r[b-1];
    adj_fill = r;
  endfunction

  // ---------------- merge (XRET, or ADJCOM when ADJCOM = 1) ----------------
  typedef struct packed {
    logic [NS-1:0][L-1:0]            val;
    logic [NS-1:0][L-1:0]            care;
    logic [31:0]                     n_luts;
    logic [31:0]                     max_in;
    logic [N_CH-1:0][NE-1:0][IW-1:0] map;
    logic [N_CH-1:0][31:0]           n_in;
    logic [NE-1:0][N_CH-1:0][IW-1:0] sel;
  } merge_t;

  function automatic merge_t xret();
    merge_t m = '0;
    for (int c = 0; c < N_CH; c++)
      for (int p = 0; p < NE; p++) begin
        logic [L-1:0] v = pat_val(p, c), cr = pat_care(p, c);
        int found = -1, k = -1;
        if (ADJCOM) begin
          v  = adj_fill(v, cr);
          cr = '1;
        end
        for (int l = 0; l < NS; l++)
          if (found < 0 && l < int'(m.n_luts) && ((m.val[l] ^ v) & m.care[l] & cr) == '0) found = l;
        if (found < 0) begin
          found = int'(m.n_luts);
          m.n_luts = m.n_luts + 1;
        end
        m.val[found]  = (m.val[found] & m.care[found]) | v;
        m.care[found] = m.care[found] | cr;
        for (int j = 0; j < NE; j++)
          if (k < 0 && j < int'(m.n_in[c]) && int'(m.map[c][j]) == found) k = j;
        if (k < 0) begin
          k = int'(m.n_in[c]);
          m.map[c][k] = IW'(found);
          m.n_in[c] = m.n_in[c] + 1;
        end
        m.sel[p][c] = IW'(k);
        if (m.n_in[c] > m.max_in) m.max_in = m.n_in[c];
      end
    // adjacent fill of the remaining don't-cares
    for (int l = 0; l < NS; l++) begin
      int first = -1;
      for (int b = 0; b < L; b++) if (first < 0 && m.care[l][b]) first = b;
      if (first >= 0)
        for (int b = 0; b < L; b++)
          if (!m.care[l][b]) m.val[l][b] = (b < first) ? m.val[l][first] : m.val[l][b-1];
    end
    return m;
  endfunction

  localparam merge_t M   = xret();
  localparam int     NL  = int'(M.n_luts);
  localparam int     MI  = (int'(M.max_in) > 1) ? int'(M.max_in) : 2;
  localparam int     SW  = $clog2(MI);
  localparam int     LIW = (NL > 1) ? $clog2(NL) : 1;

  function automatic logic [NL-1:0][L-1:0] mk_luts();
    for (int l = 0; l < NL; l++) mk_luts[l] = M.val[l];
  endfunction
  function automatic logic [N_CH-1:0][MI-1:0][LIW-1:0] mk_map();
    for (int c = 0; c < N_CH; c++)
      for (int k = 0; k < MI; k++)
        mk_map[c][k] = LIW'((k < int'(M.n_in[c])) ? M.map[c][k] : M.map[c][0]);
  endfunction
  function automatic logic [NE-1:0][N_CH-1:0][SW-1:0] mk_sel();
    for (int p = 0; p < NE; p++)
      for (int c = 0; c < N_CH; c++) mk_sel[p][c] = SW'(M.sel[p][c]);
  endfunction

  // ---------------- design under test ----------------
  logic rst;
  logic [N_CH-1:0] so, si;
  logic se, arst, done, pass;

  tester_top #(.N_CHAINS(N_CH), .LUT_DEPTH(L), .N_SEGS(N_SEGS), .N_PATTERNS(N_PAT), .N_LUTS(NL),
               .MUX_IN(MI), .LUT_INIT(mk_luts()), .MUX_MAP(mk_map()), .SEL_INIT(mk_sel()),
               .MISR_LEN(ML), .MISR_TAPS(TAPS)) dut (
    .clk, .rst, .scan_out_i(so), .scan_en_o(se), .asic_rst_o(arst),
    .scan_in_o(si), .test_done_o(done), .test_pass_o(pass));

  scan_die_model #(.N_CHAINS(N_CH), .CHAIN_LEN(C)) die (
    .clk, .rst(rst | arst), .se, .si, .fault_en(1'b0), .fault_idx(0), .so);

  // ---------------- software reference ----------------
  localparam int SM = N_CH * C;
  logic [SM-1:0] sw_s;
  logic [ML-1:0] sw_sig;

  function automatic logic [SM-1:0] capture(logic [SM-1:0] s);
    logic [SM-1:0] n;
    for (int i = 0; i < SM; i++) n[i] = s[i] ^ s[(i+5) % SM] ^ (s[(i+1) % SM] & ~s[(i+2) % SM]);
    return n;
  endfunction

  function automatic logic [ML-1:0] misr_step(logic [ML-1:0] q, logic [N_CH-1:0] d);
    logic [ML-1:0] n = {q[ML-2:0], ~^(q & TAPS)};
    for (int k = 0; k < N_CH; k++) n[k] ^= d[k];
    return n;
  endfunction

  initial begin
    int cyc = 0, t_first_se = -1, run_idx = 0, bitpos = 0, n_se = 0;
    bit in_shift = 0, have_resp = 0;
    logic [N_CH-1:0] prev_si = '0;
    logic [L-1:0] cr_w, v_w;
    checks = 0; failures = 0; finished = 0; n_toggle = 0; n_capture = 0; n_unload = 0; n_reuse = 0;
    n_luts_o = NL;
    rst = 1; sw_s = '0; sw_sig = '0;
    wait (start);
    repeat (3) @(negedge clk);
    rst = 0;
    while (!done && cyc < N_PAT * (C + 8) + C + 200) begin
      if (arst) sw_s = '0;
      else if (se) begin
        if (t_first_se < 0) t_first_se = cyc;
        n_se++;
        if (!in_shift) begin in_shift = 1; bitpos = 0; end
        if (have_resp) begin
          logic [N_CH-1:0] ob;
          for (int c = 0; c < N_CH; c++) ob[c] = sw_s[c*C + C - 1];
          checks++;
          if (ob != so) begin failures++; $display("FAIL scan-out mismatch cycle %0d", cyc); end
          sw_sig = misr_step(sw_sig, ob);
        end
        if (run_idx < N_PAT) begin
          // scan-input transitions inside a LUT slice
          if (bitpos % L != 0) n_toggle += $countones(si ^ prev_si);
          prev_si = si;
          for (int c = 0; c < N_CH; c++) begin
            cr_w = pat_care(run_idx * N_SEGS + bitpos / L, c);
            v_w  = pat_val(run_idx * N_SEGS + bitpos / L, c);
            checks++;
            if (cr_w[bitpos % L] && si[c] != v_w[bitpos % L]) begin
              failures++;
              $display("FAIL pattern %0d chain %0d bit %0d", run_idx, c, bitpos);
            end
          end
        end else n_unload++;
        for (int c = 0; c < N_CH; c++)
          for (int k = C - 1; k >= 0; k--)
            sw_s[c*C + k] = (k == 0) ? si[c] : sw_s[c*C + k - 1];
        bitpos++;
      end else if (in_shift) begin
        in_shift = 0;
        checks++;
        if (bitpos != C) begin failures++; $display("FAIL shift length %0d", bitpos); end
        if (run_idx < N_PAT) begin
          n_capture++;
          sw_s = capture(sw_s);
          have_resp = 1;
        end
        run_idx++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++; if (!done) begin failures++; $display("FAIL no done"); end
    checks++;
    if (cyc - t_first_se != N_PAT*(C+1) + C + 1) begin
      failures++; $display("FAIL test length %0d", cyc - t_first_se);
    end
    checks++; if (n_se != (N_PAT+1)*C) begin failures++; $display("FAIL shift clocks %0d", n_se); end
    checks++; if (n_capture != N_PAT) begin failures++; $display("FAIL captures %0d", n_capture); end
    checks++;
    if (dut.u_misr.sig_o != sw_sig) begin failures++; $display("FAIL signature"); end
    checks++; if (pass != (sw_sig == '0)) begin failures++; $display("FAIL verdict"); end
    // slices applied more than once from one stored LUT
    n_reuse = NS - NL;
    $display("workload %s %0d chains x %0d segments x %0d patterns: %0d LUTs (%0d slices), mux inputs %0d, select bits per RAM entry %0d, %0d clocks, %0d in-slice scan-input toggles, signature %h",
             ADJCOM ? "ADJCOM" : "XRET", N_CH, N_SEGS, N_PAT, NL, NS, MI, N_CH * SW, cyc - t_first_se, n_toggle, sw_sig);
    finished = 1;
  end
endmodule
