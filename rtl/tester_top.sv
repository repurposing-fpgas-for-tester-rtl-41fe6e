// tester_top: LUT-based scan tester for a die in a 3D stack.
//
// The tester sits in an FPGA layer and feeds N_CHAINS short scan chains of
// the die under test in parallel, one bit per chain per clock. Pattern data
// is stored as merged slices in a pool of 1-bit LUTs (lut_layer), each slice
// LUT_DEPTH bits long; a chain is N_SEGS slices (CHAIN_LEN = N_SEGS*LUT_DEPTH
// flip-flops). For every pattern, segment and chain, a select value in the
// select-line RAM (sel_ram) tells that chain's multiplexer (mux_layer) which
// LUT holds its slice; the LUT address generator steps all LUTs through
// their bits while the RAM address generator steps through the segments and
// patterns.
// The chosen bits are registered onto the scan-data bus (scan_reg). The
// scan-out bits of all chains are compacted in a MISR and the final
// signature is compared with a golden one (sig_cmp). The sequencer (se_gen)
// produces scan enable, the die reset and the compaction enable.
//
// Pipeline: the sequencer's control word for cycle t is delayed by two
// registers, matching the select RAM read and the scan register, so that
// scan_in_o, scan_en_o and MISR compaction line up in the same cycle.
// scan_out_i is sampled on every clock where scan_en_o is high and a
// response is being unloaded; it must be the chain's last flip-flop,
// settled before that clock edge.
//
// Interface: clk, rst (synchronous, active high) and the chains' scan-out
// bits in; scan enable, die reset, scan-data bus, done and pass/fail out.
// After rst falls the die is reset for ASIC_RST_CYCLES clocks, the test runs
// N_PATTERNS*(CHAIN_LEN+1)+CHAIN_LEN clocks and test_done_o rises one clock
// after the last unload, with test_pass_o valid from then on.
//
// The block structure, LUT sharing, per-chain muxes with stored select
// values, MISR length rule and golden-signature check follow the document.
// The default contents are its worked example (three five-bit chains, four
// patterns, one segment per chain) after X-retaining merging; the document's
// experiments use 32-bit LUTs and 32-bit chains; pipeline timing, sequencing, the done
// output and the default golden value (a placeholder) are this design's.
module tester_top
  import tester_pkg::*;
#(
  parameter int unsigned N_CHAINS   = 3,
  parameter int unsigned LUT_DEPTH  = 5,
  parameter int unsigned N_SEGS     = 1,
  parameter int unsigned N_PATTERNS = 4,
  parameter int unsigned N_LUTS     = 4,
  parameter int unsigned MUX_IN     = 3,
  parameter int unsigned SEL_W      = (MUX_IN > 1) ? $clog2(MUX_IN) : 1,
  parameter int unsigned LUT_IDX_W  = (N_LUTS > 1) ? $clog2(N_LUTS) : 1,
  parameter logic [N_LUTS-1:0][LUT_DEPTH-1:0] LUT_INIT =
    {5'b10011, 5'b11101, 5'b00001, 5'b11110},
  parameter logic [N_CHAINS-1:0][MUX_IN-1:0][LUT_IDX_W-1:0] MUX_MAP =
    {{2'd0, 2'd3, 2'd0}, {2'd2, 2'd3, 2'd1}, {2'd1, 2'd2, 2'd0}},
  parameter logic [N_PATTERNS*N_SEGS-1:0][N_CHAINS-1:0][SEL_W-1:0] SEL_INIT =
    {{2'd1, 2'd2, 2'd0}, {2'd1, 2'd1, 2'd2}, {2'd1, 2'd1, 2'd1}, {2'd0, 2'd0, 2'd0}},
  parameter int unsigned MISR_LEN   = N_CHAINS + 5,
  parameter logic [MISR_LEN-1:0] MISR_TAPS = MISR_LEN'(8'b1011_1000),
  parameter logic [MISR_LEN-1:0] GOLDEN    = '0,
  parameter int unsigned ASIC_RST_CYCLES = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N_CHAINS-1:0] scan_out_i,
  output logic                scan_en_o,
  output logic                asic_rst_o,
  output logic [N_CHAINS-1:0] scan_in_o,
  output logic                test_done_o,
  output logic                test_pass_o
);

  localparam int unsigned LAW = (LUT_DEPTH > 1) ? $clog2(LUT_DEPTH) : 1;
  localparam int unsigned PAW = (N_PATTERNS * N_SEGS > 1) ? $clog2(N_PATTERNS * N_SEGS) : 1;

  // ---- sequencer and address generators (pipeline stage 0) ----
  scan_ctl_t      ctl0, ctl1, ctl2;
  logic           lut_en, ram_en, lut_last, seg_last, pat_last;
  logic [LAW-1:0] lut_addr, lut_addr1;
  logic [PAW-1:0] pat_addr;

  se_gen #(.ASIC_RST_CYCLES(ASIC_RST_CYCLES)) u_se_gen (
    .clk, .rst,
    .lut_last_i(lut_last), .seg_last_i(seg_last), .pat_last_i(pat_last),
    .ctl_o(ctl0), .lut_en_o(lut_en), .ram_en_o(ram_en), .phase_o()
  );

  lut_addr_gen #(.LUT_DEPTH(LUT_DEPTH)) u_lut_addr (
    .clk, .rst, .en(lut_en), .clr(1'b0), .addr_o(lut_addr), .last_o(lut_last)
  );

  ram_addr_gen #(.N_PATTERNS(N_PATTERNS), .N_SEGS(N_SEGS)) u_ram_addr (
    .clk, .rst, .en(ram_en), .clr(1'b0), .addr_o(pat_addr),
    .seg_last_o(seg_last), .pat_last_o(pat_last)
  );

  // ---- stage 1: select RAM read, LUT read, mux ----
  logic [N_CHAINS-1:0][SEL_W-1:0] sel1;
  logic [N_LUTS-1:0]              lut_bits;
  logic [N_CHAINS-1:0]            chain_bits;

  sel_ram #(.N_PATTERNS(N_PATTERNS), .N_SEGS(N_SEGS), .N_CHAINS(N_CHAINS), .SEL_W(SEL_W),
            .SEL_INIT(SEL_INIT)) u_sel_ram (
    .clk, .rst, .addr_i(pat_addr), .sel_o(sel1)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      lut_addr1 <= '0;
      ctl1      <= '{asic_rst: 1'b1, default: 1'b0};
      ctl2      <= '{asic_rst: 1'b1, default: 1'b0};
    end else begin
      lut_addr1 <= lut_addr;
      ctl1      <= ctl0;
      ctl2      <= ctl1;
    end
  end

  lut_layer #(.N_LUTS(N_LUTS), .LUT_DEPTH(LUT_DEPTH), .LUT_INIT(LUT_INIT)) u_luts (
    .addr_i(lut_addr1), .bits_o(lut_bits)
  );

  mux_layer #(.N_CHAINS(N_CHAINS), .N_LUTS(N_LUTS), .MUX_IN(MUX_IN), .SEL_W(SEL_W),
              .LUT_IDX_W(LUT_IDX_W), .MUX_MAP(MUX_MAP)) u_mux (
    .lut_bits_i(lut_bits), .sel_i(sel1), .chain_bits_o(chain_bits)
  );

  // ---- stage 2: scan register, die interface, MISR ----
  scan_reg #(.N_CHAINS(N_CHAINS)) u_scan_reg (
    .clk, .rst, .load_i(ctl1.load), .d_i(chain_bits), .q_o(scan_in_o)
  );

  assign scan_en_o  = ctl2.se;
  assign asic_rst_o = ctl2.asic_rst;

  logic [MISR_LEN-1:0] sig;

  misr #(.N_IN(N_CHAINS), .MISR_LEN(MISR_LEN), .TAPS(MISR_TAPS)) u_misr (
    .clk, .rst, .en_i(ctl2.compact), .d_i(scan_out_i), .sig_o(sig)
  );

  sig_cmp #(.W(MISR_LEN), .GOLDEN(GOLDEN)) u_cmp (
    .clk, .rst, .check_i(ctl2.check), .sig_i(sig),
    .done_o(test_done_o), .pass_o(test_pass_o)
  );

  // Compaction only happens while the die is shifting.
  a_compact_in_shift: assert property (@(posedge clk) disable iff (rst)
                                       ctl2.compact |-> ctl2.se);

endmodule
