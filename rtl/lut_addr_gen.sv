// lut_addr_gen: LUT address generator.
//
// A binary up-counter that walks the bit addresses 0 .. LUT_DEPTH-1 of every
// pattern LUT, so that the LUT contents are shifted out one bit per clock.
// All LUTs share this one address. The counter advances when en is high,
// wraps to 0 after LUT_DEPTH-1, and clr (synchronous) restarts it at 0;
// last_o flags the final address of a LUT, i.e. the end of a chain segment. The counting role follows the
// document; the clear input and wrap flag are this design's choice.
module lut_addr_gen #(
  parameter int unsigned LUT_DEPTH = 5,
  parameter int unsigned AW = (LUT_DEPTH > 1) ? $clog2(LUT_DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          clr,
  output logic [AW-1:0] addr_o,
  output logic          last_o
);

  localparam logic [AW-1:0] LAST = AW'(LUT_DEPTH - 1);

  assign last_o = (addr_o == LAST);

  always_ff @(posedge clk) begin
    if (rst || clr)  addr_o <= '0;
    else if (en)     addr_o <= last_o ? '0 : addr_o + 1'b1;
  end

endmodule
