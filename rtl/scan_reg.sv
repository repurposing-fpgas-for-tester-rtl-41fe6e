// scan_reg: scan-data output register.
//
// Registers the per-chain mux outputs onto the scan-data bus that drives
// the scan inputs of the chains of the die under test, one bit per chain.
// It loads when load_i is high and otherwise holds its value, so the bus
// does not toggle during capture clocks or the final unload. Reset clears
// it. The registered bus follows the document; holding instead of clearing
// is this design's choice.
module scan_reg #(
  parameter int unsigned N_CHAINS = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load_i,
  input  logic [N_CHAINS-1:0] d_i,
  output logic [N_CHAINS-1:0] q_o
);

  always_ff @(posedge clk) begin
    if (rst)         q_o <= '0;
    else if (load_i) q_o <= d_i;
  end

endmodule
