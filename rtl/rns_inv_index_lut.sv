// rns_inv_index_lut: the Phi_j^-1 table of the index transform.
//
// Maps an index i (0 .. M-2) back to the residue g^i mod M, with g the
// primitive root rns_pkg::prim_root(M). It is a 2^W x W ROM filled at
// elaboration from rns_pkg::phi_inv; out-of-range addresses read 0.
// Combinational.
module rns_inv_index_lut #(
  parameter int unsigned M = 31,
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] idx,
  output logic [W-1:0] q
);
  logic [W-1:0] rom [2**W];

  for (genvar a = 0; a < 2**W; a++) begin : g_rom
    localparam logic [W-1:0] ENTRY = W'(rns_pkg::phi_inv(M, a));
    assign rom[a] = ENTRY;
  end

  assign q = rom[idx];
endmodule
