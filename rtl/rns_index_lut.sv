// rns_index_lut: the Phi_j table of the index transform, with zero detect.
//
// Maps a residue q (1 .. M-1) of the prime modulus M to its index i, the
// exponent with g^i = q (mod M) for the primitive root g = rns_pkg::prim_root(M).
// Multiplication by zero has no index, so the table also raises is_zero for
// q = 0; the filter carries that flag down a shift register and clears the
// product registers with it. The table is a 2^W x W ROM filled at elaboration
// from rns_pkg::phi; addresses >= M (not residues) read 0. Combinational.
module rns_index_lut #(
  parameter int unsigned M = 31,
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] q,
  output logic [W-1:0] idx,
  output logic         is_zero
);
  logic [W-1:0] rom [2**W];

  for (genvar a = 0; a < 2**W; a++) begin : g_rom
    localparam logic [W-1:0] ENTRY = W'(rns_pkg::phi(M, a));
    assign rom[a] = ENTRY;
  end

  assign idx     = rom[q];
  assign is_zero = (q == '0);
endmodule
