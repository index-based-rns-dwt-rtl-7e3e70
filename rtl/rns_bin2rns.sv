// rns_bin2rns: binary (two's complement) to RNS converter for all channels.
//
// A B-bit two's complement word x is cut into 4-bit groups x_i (the top group
// may be narrower), so that
//   |x|_m = | -2^(B-1) x_(B-1) + sum_i x_i 2^(4i) |_m .
// For every modulus m_j each group addresses a 2^4 x W table holding
// |x_i 2^(4i)|_m, the sign bit counting with negative weight in the top
// group's table; a modulo-m_j adder tree adds the table outputs. Tables are
// filled at elaboration from rns_pkg::b2r_entry.
// Folding the sign bit into the top group's table is this design's way of
// handling the -2^(B-1) term; the number of groups is ceil(B/4).
//
// Timing: two pipeline stages. The table outputs are registered at the edge
// that takes x (in_valid high); the adder-tree results are registered at the
// next edge, so out_valid/out_res follow in_valid by two clocks, one
// conversion per clock.
module rns_bin2rns #(
  parameter int unsigned B       = rns_pkg::DEF_B_IN,
  parameter int unsigned NUM_MOD = rns_pkg::DEF_NUM_MOD,
  parameter int unsigned MODULI [NUM_MOD] = rns_pkg::DEF_MODULI,
  parameter int unsigned W       = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [B-1:0] x,
  output logic         out_valid,
  output logic [W-1:0] out_res [NUM_MOD]
);
  localparam int unsigned G = (B + 3) / 4;   // number of 4-bit groups

  logic [3:0] grp [G];
  for (genvar g = 0; g < G; g++) begin : g_grp
    if (4*g + 4 <= B) begin : g_full
      assign grp[g] = x[4*g +: 4];
    end else begin : g_part
      assign grp[g] = 4'(x[B-1:4*g]);
    end
  end

  logic stage1_valid;

  for (genvar j = 0; j < NUM_MOD; j++) begin : g_mod
    localparam int unsigned MJ = MODULI[j];

    logic [W-1:0] lut_q [G];
    logic [W-1:0] sum;

    for (genvar g = 0; g < G; g++) begin : g_lut
      logic [W-1:0] rom [16];
      for (genvar a = 0; a < 16; a++) begin : g_rom
        localparam logic [W-1:0] ENTRY = W'(rns_pkg::b2r_entry(MJ, B, g, a));
        assign rom[a] = ENTRY;
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        lut_q[g] <= '0;
        else if (in_valid) lut_q[g] <= rom[grp[g]];
      end
    end

    rns_adder_tree #(.M(MJ), .W(W), .N(G)) u_tree (.x(lut_q), .s(sum));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            out_res[j] <= '0;
      else if (stage1_valid) out_res[j] <= sum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1_valid <= 1'b0;
      out_valid    <= 1'b0;
    end else begin
      stage1_valid <= in_valid;
      out_valid    <= stage1_valid;
    end
  end
endmodule
