// sel_ram: select-line RAM (the "RAM layer").
//
// Holds, for every test pattern, the select value of every chain
// multiplexer: entry p*N_SEGS+s, field c is the data input of chain c's mux
// whose LUT carries segment s of pattern p's slice for that chain (N_SEGS is
// the number of LUT-sized segments per chain, 1 when a chain is exactly one
// LUT long). Reading is synchronous: sel_o
// shows entry addr_i one clock after addr_i is presented, which maps onto a
// block RAM or onto distributed RAM followed by a register. Contents come
// from SEL_INIT (FPGA configuration). Keeping the select values in a RAM
// apart from the LUT pool follows the document; the one-cycle read latency
// is this design's choice.
//
// Default contents: the select values of the worked example, chain 1 =
// 0,1,2,0; chain 2 = 0,1,1,2; chain 3 = 0,1,1,1 for patterns 1..4, one
// segment per chain.
module sel_ram #(
  parameter int unsigned N_PATTERNS = 4,
  parameter int unsigned N_SEGS     = 1,
  parameter int unsigned N_CHAINS   = 3,
  parameter int unsigned SEL_W      = 2,
  parameter int unsigned N_ENTRIES  = N_PATTERNS * N_SEGS,
  parameter int unsigned AW = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1,
  parameter logic [N_ENTRIES-1:0][N_CHAINS-1:0][SEL_W-1:0] SEL_INIT =
    {{2'd1, 2'd2, 2'd0}, {2'd1, 2'd1, 2'd2}, {2'd1, 2'd1, 2'd1}, {2'd0, 2'd0, 2'd0}}
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [AW-1:0]                    addr_i,
  output logic [N_CHAINS-1:0][SEL_W-1:0]   sel_o
);

  logic [N_CHAINS-1:0][SEL_W-1:0] mem [N_ENTRIES];

  always_comb begin
    for (int unsigned e = 0; e < N_ENTRIES; e++) mem[e] = SEL_INIT[e];
  end

  always_ff @(posedge clk) begin
    if (rst)                          sel_o <= '0;
    else if (32'(addr_i) < N_ENTRIES) sel_o <= mem[addr_i];
  end

endmodule
