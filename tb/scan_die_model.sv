// scan_die_model: behavioural model of a die under test with N_CHAINS
// scan chains of CHAIN_LEN flip-flops (testbench only, not synthesizable
// intent).
//
// With se high every chain shifts by one: flip-flop 0 takes si[c] and
// so[c] is the last flip-flop. With se low the die captures: the whole
// state, flattened to bit i = c*CHAIN_LEN + k, is replaced by
//   s'[i] = s[i] ^ s[i+5] ^ (s[i+1] & ~s[i+2])   (indices modulo the size),
// a stand-in for the circuit's combinational logic. When fault_en is set
// the captured value of bit fault_idx is stuck at 0. rst clears the state.
module scan_die_model #(
  parameter int unsigned N_CHAINS  = 3,
  parameter int unsigned CHAIN_LEN = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                se,
  input  logic [N_CHAINS-1:0] si,
  input  logic                fault_en,
  input  int unsigned         fault_idx,
  output logic [N_CHAINS-1:0] so
);
  localparam int unsigned M = N_CHAINS * CHAIN_LEN;
  logic [M-1:0] s;

  always_comb
    for (int unsigned c = 0; c < N_CHAINS; c++) so[c] = s[c*CHAIN_LEN + CHAIN_LEN - 1];

  always_ff @(posedge clk) begin
    if (rst) s <= '0;
    else if (se) begin
      for (int unsigned c = 0; c < N_CHAINS; c++)
        for (int unsigned k = 0; k < CHAIN_LEN; k++)
          s[c*CHAIN_LEN + k] <= (k == 0) ? si[c] : s[c*CHAIN_LEN + k - 1];
    end else begin
      for (int unsigned i = 0; i < M; i++)
        s[i] <= (fault_en && i == fault_idx) ? 1'b0
              : s[i] ^ s[(i + 5) % M] ^ (s[(i + 1) % M] & ~s[(i + 2) % M]);
    end
  end
endmodule
