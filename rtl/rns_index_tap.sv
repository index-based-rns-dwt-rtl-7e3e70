// rns_index_tap: one filter product of an index-based RNS filter.
//
// Multiplies a sample by a coefficient in GF(M): the sample index and the
// coefficient index are added modulo M-1, the Phi_j^-1 table turns the sum
// back into a residue, and a clearable register (CLRk in the figures of the
// architecture) captures it. The register is cleared instead when the
// sample is zero (x_zero, from the zero-detect shift register) or when the
// coefficient is zero (c_zero), since neither has an index.
// The coefficient zero flag is this design's addition: the architecture only
// clears on zero samples, which is enough when no coefficient is a multiple
// of the modulus.
// Timing: the product appears on p one clock after a cycle with en high; p
// holds while en is low. Asynchronous active-low reset clears p.
module rns_index_tap #(
  parameter int unsigned M = 31,
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] x_idx,
  input  logic         x_zero,
  input  logic [W-1:0] c_idx,
  input  logic         c_zero,
  output logic [W-1:0] p
);
  logic [W-1:0] sum_idx;
  logic [W-1:0] prod;

  rns_mod_add #(.M(M - 1), .W(W)) u_idx_add (
    .a(x_idx), .b(c_idx), .s(sum_idx)
  );

  rns_inv_index_lut #(.M(M), .W(W)) u_inv (
    .idx(sum_idx), .q(prod)
  );

  // CLR register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                p <= '0;
    else if (en) begin
      if (x_zero || c_zero)    p <= '0;
      else                     p <= prod;
    end
  end
endmodule
