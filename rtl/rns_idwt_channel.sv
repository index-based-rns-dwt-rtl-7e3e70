// rns_idwt_channel: one modulo-M channel of an octave of the index-based RNS
// synthesis (inverse DWT) filter bank.
//
// From one approximation sample a_n and one detail sample d_n per step it
// rebuilds two samples of the finer sequence:
//   even  y_(2n)   = | sum_l gs_(2l)   a_(n-l) + sum_l hs_(2l)   d_(n-l) |_M
//   odd   y_(2n+1) = | sum_l gs_(2l+1) a_(n-l) + sum_l hs_(2l+1) d_(n-l) |_M
// for l = 0 .. N_TAPS/2-1, where gs and hs are the low- and high-pass
// synthesis filters (upsampling by two followed by filtering, written in
// polyphase form).
//
// Structure: a and d each pass through a Phi_j table and a zero detector into
// a delay line of N_TAPS/2-1 registers. Delay-line position l feeds the two
// products gs_(2l), gs_(2l+1) (approximation line) or hs_(2l), hs_(2l+1)
// (detail line), so each zero flag clears two product registers (the CLR'2l,
// CLR'2l+1 pairs of the architecture). Products are formed as in the analysis
// filter (rns_index_tap). The even output sums the even-numbered products of
// both lines, the odd output the odd-numbered ones; each is one modulo-M adder
// tree whose root adds the approximation half to the detail half.
//
// Coefficients are index-domain inputs, as for rns_dwt_channel, with a zero
// flag per coefficient (this design's own addition).
//
// Timing: a pair (in_a, in_d) is taken in a cycle with in_valid high; the
// product registers load at that edge and an output register (this design's
// choice) holds both outputs, so out_valid rises two clocks later. Delay
// lines reset to zero samples.
module rns_idwt_channel #(
  parameter int unsigned M      = 31,
  parameter int unsigned W      = 5,
  parameter int unsigned N_TAPS = 8   // even, at least 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      in_a,
  input  logic [W-1:0]      in_d,
  input  logic [W-1:0]      g_idx  [N_TAPS],
  input  logic [N_TAPS-1:0] g_zero,
  input  logic [W-1:0]      h_idx  [N_TAPS],
  input  logic [N_TAPS-1:0] h_zero,
  output logic              out_valid,
  output logic [W-1:0]      out_even,
  output logic [W-1:0]      out_odd
);
  localparam int unsigned NH = N_TAPS / 2;

  logic [W-1:0] a_idx, d_idx;
  logic         a_zero, d_zero;

  rns_index_lut #(.M(M), .W(W)) u_phi_a (.q(in_a), .idx(a_idx), .is_zero(a_zero));
  rns_index_lut #(.M(M), .W(W)) u_phi_d (.q(in_d), .idx(d_idx), .is_zero(d_zero));

  // delay lines, position l >= 1 holds the sample of l steps ago
  logic [W-1:0]  a_reg [1:NH-1];
  logic [W-1:0]  d_reg [1:NH-1];
  logic [NH-1:1] a_zreg, d_zreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l < int'(NH); l++) begin
        a_reg[l] <= '0;
        d_reg[l] <= '0;
      end
      a_zreg <= '1;
      d_zreg <= '1;
    end else if (in_valid) begin
      a_reg[1]  <= a_idx;
      d_reg[1]  <= d_idx;
      a_zreg[1] <= a_zero;
      d_zreg[1] <= d_zero;
      for (int l = 2; l < int'(NH); l++) begin
        a_reg[l]  <= a_reg[l-1];
        d_reg[l]  <= d_reg[l-1];
        a_zreg[l] <= a_zreg[l-1];
        d_zreg[l] <= d_zreg[l-1];
      end
    end
  end

  logic [W-1:0] ax_idx [NH];
  logic [W-1:0] dx_idx [NH];
  logic [NH-1:0] ax_zero, dx_zero;

  assign ax_idx[0]  = a_idx;
  assign dx_idx[0]  = d_idx;
  assign ax_zero[0] = a_zero;
  assign dx_zero[0] = d_zero;
  for (genvar l = 1; l < NH; l++) begin : g_pos
    assign ax_idx[l]  = a_reg[l];
    assign dx_idx[l]  = d_reg[l];
    assign ax_zero[l] = a_zreg[l];
    assign dx_zero[l] = d_zreg[l];
  end

  // even_terms = {gs0, gs2, .., hs0, hs2, ..}; odd_terms likewise
  logic [W-1:0] even_terms [2*NH];
  logic [W-1:0] odd_terms  [2*NH];

  logic [W-1:0] pg [N_TAPS];
  logic [W-1:0] ph [N_TAPS];

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    rns_index_tap #(.M(M), .W(W)) u_g (
      .clk, .rst_n, .en(in_valid),
      .x_idx(ax_idx[k/2]), .x_zero(ax_zero[k/2]),
      .c_idx(g_idx[k]), .c_zero(g_zero[k]), .p(pg[k])
    );
    rns_index_tap #(.M(M), .W(W)) u_h (
      .clk, .rst_n, .en(in_valid),
      .x_idx(dx_idx[k/2]), .x_zero(dx_zero[k/2]),
      .c_idx(h_idx[k]), .c_zero(h_zero[k]), .p(ph[k])
    );
  end

  for (genvar l = 0; l < NH; l++) begin : g_sort
    assign even_terms[l]      = pg[2*l];
    assign even_terms[NH + l] = ph[2*l];
    assign odd_terms[l]       = pg[2*l+1];
    assign odd_terms[NH + l]  = ph[2*l+1];
  end

  logic [W-1:0] sum_even, sum_odd;
  rns_adder_tree #(.M(M), .W(W), .N(2*NH)) u_tree_even (.x(even_terms), .s(sum_even));
  rns_adder_tree #(.M(M), .W(W), .N(2*NH)) u_tree_odd  (.x(odd_terms),  .s(sum_odd));

  logic prod_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_valid <= 1'b0;
      out_valid  <= 1'b0;
      out_even   <= '0;
      out_odd    <= '0;
    end else begin
      prod_valid <= in_valid;
      out_valid  <= prod_valid;
      if (prod_valid) begin
        out_even <= sum_even;
        out_odd  <= sum_odd;
      end
    end
  end
endmodule
