// mux_layer: one multiplexer per scan chain.
//
// Chain c's mux has MUX_IN data inputs; input k is wired to LUT
// MUX_MAP[c][k] of the pool. The chain's select value (from the select-line
// RAM) picks one input, so chain_bits_o[c] = lut_bits_i[MUX_MAP[c][sel_i[c]]].
// Several muxes may be wired to the same LUT, which is how one stored slice
// serves several chains. Purely combinational.
//
// The document sizes each chain's mux to the number of distinct LUTs that
// chain uses; here every mux has MUX_IN inputs and a chain needing fewer
// repeats a LUT on the spare inputs. A select value of MUX_IN or more
// selects input 0. Default wiring is the worked example: chain 1 uses LUTs
// 0,2,1; chain 2 uses LUTs 1,3,2; chain 3 uses LUTs 0,3.
module mux_layer #(
  parameter int unsigned N_CHAINS  = 3,
  parameter int unsigned N_LUTS    = 4,
  parameter int unsigned MUX_IN    = 3,
  parameter int unsigned SEL_W     = (MUX_IN > 1) ? $clog2(MUX_IN) : 1,
  parameter int unsigned LUT_IDX_W = (N_LUTS > 1) ? $clog2(N_LUTS) : 1,
  parameter logic [N_CHAINS-1:0][MUX_IN-1:0][LUT_IDX_W-1:0] MUX_MAP =
    {{2'd0, 2'd3, 2'd0}, {2'd2, 2'd3, 2'd1}, {2'd1, 2'd2, 2'd0}}
) (
  input  logic [N_LUTS-1:0]               lut_bits_i,
  input  logic [N_CHAINS-1:0][SEL_W-1:0]  sel_i,
  output logic [N_CHAINS-1:0]             chain_bits_o
);

  always_comb begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      chain_bits_o[c] = lut_bits_i[MUX_MAP[c][0]];
      for (int unsigned k = 1; k < MUX_IN; k++)
        if (32'(sel_i[c]) == k) chain_bits_o[c] = lut_bits_i[MUX_MAP[c][k]];
    end
  end

endmodule
