// rns_dwt_channel: one modulo-M channel of an octave of the index-based RNS
// analysis (DWT) filter bank.
//
// Computes, for every input pair, the approximation and detail outputs
//   a_n = | sum_k g_k a'_(2n-k) |_M      d_n = | sum_k h_k a'_(2n-k) |_M
// (k = 0 .. N_TAPS-1) of an N_TAPS-tap two-channel filter bank with
// decimation by two, where a' is the input sequence of the octave.
//
// Structure, as in the channel architecture this design follows: the input
// arrives already split into its even sequence a'_(2n) and odd sequence
// a'_(2n+1). Each goes through its own Phi_j table into the index domain, and
// a zero detector flags zero samples. Even-numbered taps k = 2l read the even
// sequence delayed by l pairs; odd-numbered taps k = 2l+1 read the odd
// sequence delayed by l+1 pairs, so the odd line starts with a register and
// the even line does not. Each tap position feeds two products, g_k and h_k,
// that share the sample index and its zero flag. A product is an index adder
// modulo M-1, a Phi_j^-1 table and a clearable register (rns_index_tap). Two
// modulo-M adder trees sum the g and h products.
//
// Coefficients are run-time inputs in the index domain: g_idx[k] = Phi_j(g_k)
// (the host computes them with the primitive root rns_pkg::prim_root(M)) and
// g_zero[k] set when g_k is a multiple of M (this flag is this design's own).
// Zero-detect flags travel with the sample indices through the same delay
// registers, which is the CLR shift register of the architecture.
//
// Timing: in_even/in_odd are taken in a cycle with in_valid high (one pair per
// clock at most). The products are registered at that clock edge; the adder
// trees feed an output register (this design's choice), so out_valid rises
// two clocks after the in_valid cycle. The delay lines start out as zero
// samples after reset.
module rns_dwt_channel #(
  parameter int unsigned M      = 31,
  parameter int unsigned W      = 5,
  parameter int unsigned N_TAPS = 8   // even, at least 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      in_even,
  input  logic [W-1:0]      in_odd,
  input  logic [W-1:0]      g_idx  [N_TAPS],
  input  logic [N_TAPS-1:0] g_zero,
  input  logic [W-1:0]      h_idx  [N_TAPS],
  input  logic [N_TAPS-1:0] h_zero,
  output logic              out_valid,
  output logic [W-1:0]      out_a,
  output logic [W-1:0]      out_d
);
  localparam int unsigned NH = (N_TAPS + 1) / 2;   // taps per phase

  // index-domain input samples and zero flags
  logic [W-1:0] e_idx, o_idx;
  logic         e_zero, o_zero;

  rns_index_lut #(.M(M), .W(W)) u_phi_even (.q(in_even), .idx(e_idx), .is_zero(e_zero));
  rns_index_lut #(.M(M), .W(W)) u_phi_odd  (.q(in_odd),  .idx(o_idx), .is_zero(o_zero));

  // delay lines: e_reg[l] holds the even sample of l pairs ago (l >= 1),
  // o_reg[l] the odd sample of l+1 pairs ago
  logic [W-1:0]  e_reg [1:NH-1];
  logic [NH-1:1] e_zreg;
  logic [W-1:0]  o_reg [NH];
  logic [NH-1:0] o_zreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l < int'(NH); l++) e_reg[l] <= '0;
      for (int l = 0; l < int'(NH); l++) o_reg[l] <= '0;
      e_zreg <= '1;
      o_zreg <= '1;
    end else if (in_valid) begin
      e_reg[1]  <= e_idx;
      e_zreg[1] <= e_zero;
      for (int l = 2; l < int'(NH); l++) begin
        e_reg[l]  <= e_reg[l-1];
        e_zreg[l] <= e_zreg[l-1];
      end
      o_reg[0]  <= o_idx;
      o_zreg[0] <= o_zero;
      for (int l = 1; l < int'(NH); l++) begin
        o_reg[l]  <= o_reg[l-1];
        o_zreg[l] <= o_zreg[l-1];
      end
    end
  end

  // tap k reads the even line (k even) or odd line (k odd)
  logic [W-1:0] x_idx  [N_TAPS];
  logic [N_TAPS-1:0] x_zero;
  logic [W-1:0] pg [N_TAPS];
  logic [W-1:0] ph [N_TAPS];

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    if (k == 0) begin : g_now
      assign x_idx[k]  = e_idx;
      assign x_zero[k] = e_zero;
    end else if (k % 2 == 0) begin : g_even
      assign x_idx[k]  = e_reg[k/2];
      assign x_zero[k] = e_zreg[k/2];
    end else begin : g_odd
      assign x_idx[k]  = o_reg[k/2];
      assign x_zero[k] = o_zreg[k/2];
    end

    rns_index_tap #(.M(M), .W(W)) u_g (
      .clk, .rst_n, .en(in_valid),
      .x_idx(x_idx[k]), .x_zero(x_zero[k]),
      .c_idx(g_idx[k]), .c_zero(g_zero[k]), .p(pg[k])
    );
    rns_index_tap #(.M(M), .W(W)) u_h (
      .clk, .rst_n, .en(in_valid),
      .x_idx(x_idx[k]), .x_zero(x_zero[k]),
      .c_idx(h_idx[k]), .c_zero(h_zero[k]), .p(ph[k])
    );
  end

  logic [W-1:0] sum_a, sum_d;
  rns_adder_tree #(.M(M), .W(W), .N(N_TAPS)) u_tree_a (.x(pg), .s(sum_a));
  rns_adder_tree #(.M(M), .W(W), .N(N_TAPS)) u_tree_d (.x(ph), .s(sum_d));

  logic prod_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_valid <= 1'b0;
      out_valid  <= 1'b0;
      out_a      <= '0;
      out_d      <= '0;
    end else begin
      prod_valid <= in_valid;
      out_valid  <= prod_valid;
      if (prod_valid) begin
        out_a <= sum_a;
        out_d <= sum_d;
      end
    end
  end
endmodule
