// rns_adder_tree: combinational binary tree of modulo-M adders.
//
// Sums N residues modulo M. The inputs are the leaves of a balanced tree
// padded with zeros to the next power of two; every inner node is one
// rns_mod_add. Input 0 .. N/2-1 end up in the left half of the tree, so the
// root adds the sum of the first half to the sum of the second half.
module rns_adder_tree #(
  parameter int unsigned M = 31,
  parameter int unsigned W = 5,
  parameter int unsigned N = 8
) (
  input  logic [W-1:0] x [N],
  output logic [W-1:0] s
);
  localparam int unsigned LEVELS = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned P      = 1 << LEVELS;

  // heap-ordered nodes: node 1 is the root, leaves are P .. 2P-1
  logic [W-1:0] node [1:2*P-1];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[P+i] = x[i];
    end else begin : g_pad
      assign node[P+i] = '0;
    end
  end

  for (genvar i = 1; i < P; i++) begin : g_add
    rns_mod_add #(.M(M), .W(W)) u_add (
      .a(node[2*i]), .b(node[2*i+1]), .s(node[i])
    );
  end

  assign s = node[1];
endmodule
