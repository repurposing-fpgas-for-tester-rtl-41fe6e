// lut_layer: pool of pattern LUTs.
//
// Each of the N_LUTS LUTs is a 1-bit-wide, LUT_DEPTH-deep read-only table
// holding one merged scan-pattern slice (on an FPGA with 5-input LUTs a
// slice of 32 bits fits exactly one LUT). All LUTs are read asynchronously at
// the same bit address; bits_o[i] is bit addr_i of LUT i. Identical or
// compatible slices of different patterns and chains share one LUT, so a LUT
// output may feed several chain multiplexers.
//
// LUT_INIT[i][a] is the content, as the FPGA configuration would set it. The
// default is the worked example of the method (three chains, four patterns,
// five-bit chains) after X-retaining merging: slices 01111, 10000, 10111 and
// 11001, written left to right from address 0. The table structure follows
// the document; the example contents were derived for this design.
module lut_layer #(
  parameter int unsigned N_LUTS    = 4,
  parameter int unsigned LUT_DEPTH = 5,
  parameter int unsigned AW = (LUT_DEPTH > 1) ? $clog2(LUT_DEPTH) : 1,
  parameter logic [N_LUTS-1:0][LUT_DEPTH-1:0] LUT_INIT =
    {5'b10011, 5'b11101, 5'b00001, 5'b11110}
) (
  input  logic [AW-1:0]     addr_i,
  output logic [N_LUTS-1:0] bits_o
);

  always_comb begin
    for (int unsigned i = 0; i < N_LUTS; i++)
      bits_o[i] = LUT_INIT[i][addr_i];
  end

endmodule
