// rns_mod_add: combinational modular adder, s = |a + b|_M.
//
// Operands are residues in 0 .. M-1. The raw sum is formed one bit wider and
// M is subtracted when the sum reaches M, so the result is again a residue.
// The filter bank uses it with M = m_j for the adder trees that accumulate
// filter products, and with M = m_j - 1 for the index adders that multiply in
// the index domain. Purely combinational; no clock.
module rns_mod_add #(
  parameter int unsigned M = 31,
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    if (sum >= (W+1)'(M)) sum = sum - (W+1)'(M);
    s = sum[W-1:0];
  end
endmodule
