// ram_addr_gen: RAM address generator.
//
// Addresses the select-line RAM. Each RAM entry holds the mux select values
// of all chains for one LUT-sized segment of one pattern; a chain of
// N_SEGS*LUT_DEPTH flip-flops therefore needs N_SEGS entries per pattern,
// stored at addr = pattern*N_SEGS + segment. When en is high the generator
// steps to the next segment, and after the last segment of a pattern to
// segment 0 of the next pattern, wrapping after the last pattern. seg_last_o
// and pat_last_o flag the last segment and the last pattern; rst or clr
// restart at entry 0. The document names the block and notes that longer
// chains need several select values per pattern; the counter layout is this
// design's choice.
module ram_addr_gen #(
  parameter int unsigned N_PATTERNS = 4,
  parameter int unsigned N_SEGS     = 1,
  parameter int unsigned AW = (N_PATTERNS * N_SEGS > 1) ? $clog2(N_PATTERNS * N_SEGS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          clr,
  output logic [AW-1:0] addr_o,
  output logic          seg_last_o,
  output logic          pat_last_o
);

  localparam int unsigned SW = (N_SEGS > 1) ? $clog2(N_SEGS) : 1;
  localparam int unsigned PW = (N_PATTERNS > 1) ? $clog2(N_PATTERNS) : 1;

  logic [SW-1:0] seg;
  logic [PW-1:0] pat;

  assign seg_last_o = (32'(seg) == N_SEGS - 1);
  assign pat_last_o = (32'(pat) == N_PATTERNS - 1);
  assign addr_o     = AW'(32'(pat) * N_SEGS + 32'(seg));

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      seg <= '0;
      pat <= '0;
    end else if (en) begin
      if (seg_last_o) begin
        seg <= '0;
        pat <= pat_last_o ? '0 : pat + 1'b1;
      end else begin
        seg <= seg + 1'b1;
      end
    end
  end

endmodule
