// sig_cmp: golden-signature comparison.
//
// When check_i is high, compares the signature sig_i bit by bit with the
// stored GOLDEN value (XNOR of each bit pair, then AND of all results) and
// registers the outcome: pass_o = 1 when every bit matches. done_o rises in
// the same clock and both outputs hold until reset. The golden signature
// and XNOR comparison follow the document; the golden value is specific to
// the circuit under test and its default of zero is a placeholder.
module sig_cmp #(
  parameter int unsigned W = 8,
  parameter logic [W-1:0] GOLDEN = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         check_i,
  input  logic [W-1:0] sig_i,
  output logic         done_o,
  output logic         pass_o
);

  logic [W-1:0] match;
  assign match = sig_i ~^ GOLDEN;

  always_ff @(posedge clk) begin
    if (rst) begin
      done_o <= 1'b0;
      pass_o <= 1'b0;
    end else if (check_i && !done_o) begin
      done_o <= 1'b1;
      pass_o <= &match;
    end
  end

endmodule
