// misr: multiple-input signature register.
//
// Compacts the scan-out bits of all chains into a MISR_LEN-bit signature,
// one shift per clock while en_i is high. Stages are numbered 1..MISR_LEN
// (bit i-1 of sig_o is stage i). On each enabled clock stage 1 takes the
// XNOR of the tap stages and stage i takes stage i-1; input bit k is XORed
// into stage k+1. TAPS is a mask with bit t-1 set for tap stage t. Reset
// loads all zeros, which is not the lock-up state of an XNOR register.
//
// The length rule (number of chains + 5) and the XNOR feedback follow the
// document; the default 8-bit tap set 8,6,5,4 is taken from the usual XNOR
// LFSR tap tables, as the document lists taps only for its benchmark sizes.
module misr #(
  parameter int unsigned N_IN     = 3,
  parameter int unsigned MISR_LEN = N_IN + 5,
  parameter logic [MISR_LEN-1:0] TAPS = MISR_LEN'(8'b1011_1000)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en_i,
  input  logic [N_IN-1:0]     d_i,
  output logic [MISR_LEN-1:0] sig_o
);

  logic                fb;
  logic [MISR_LEN-1:0] shifted;

  assign fb = ~^(sig_o & TAPS);

  always_comb begin
    shifted = {sig_o[MISR_LEN-2:0], fb};
    for (int unsigned k = 0; k < N_IN; k++) shifted[k] = shifted[k] ^ d_i[k];
  end

  always_ff @(posedge clk) begin
    if (rst)       sig_o <= '0;
    else if (en_i) sig_o <= shifted;
  end

  initial assert (N_IN <= MISR_LEN) else $error("misr: more inputs than stages");

endmodule
