// tb_rns_dwt_cfg_run: one configuration of the RNS wavelet filter bank,
// driven and checked on its own; used by tb_rns_dwt_workloads to run the
// configurations of the published comparison side by side.
//
// Parameters give the input width B, coefficient width CB, taps N and the
// modulus set. One analysis octave is run with full-scale random B-bit
// input and random CB-bit signed coefficients (one coefficient set to a
// multiple of the first modulus), and the synthesis octave is fed from its
// outputs. All residue outputs are compared with an integer model reduced
// modulo each m_j, all scaled binary outputs with the model value wrapped
// into the signed dynamic range and scaled by 2^16 / M (NUM_MOD/2 + 1 units
// of tolerance). It also checks that the analysis outputs, whose size the
// configuration was chosen for, never leave the dynamic range. When done it
// raises done and reports its check and failure counts.
module tb_rns_dwt_cfg_run #(
  parameter int B  = 8,
  parameter int CB = 10,
  parameter int N  = 8,
  parameter int L  = 5,
  parameter int W  = 5,
  parameter int unsigned MOD [L] = '{31, 29, 23, 19, 17},
  parameter int S  = 128
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_rns_ref_pkg::*;
  localparam int OCT = 1, OW = 16;

  function automatic longint prod_mod();
    longint p;
    p = 1;
    for (int j = 0; j < L; j++) p *= MOD[j];
    return p;
  endfunction
  localparam longint BIGM = prod_mod();
  initial begin checks = 0; failures = 0; done = 0; end

  logic              rst_n = 0;
  logic              x_valid = 0;
  logic [B-1:0]      x = 0;
  logic [W-1:0]      ana_g_idx  [L][N];
  logic [N-1:0]      ana_g_zero [L];
  logic [W-1:0]      ana_h_idx  [L][N];
  logic [N-1:0]      ana_h_zero [L];
  logic [OCT-1:0]    d_valid;
  logic [W-1:0]      d_res [OCT][L];
  logic [OCT-1:0]    d_bin_valid;
  logic [OW-1:0]     d_bin [OCT];
  logic              a_valid;
  logic [W-1:0]      a_res [L];
  logic              a_bin_valid;
  logic [OW-1:0]     a_bin;
  logic              syn_valid;
  logic [W-1:0]      syn_a_res [L];
  logic [W-1:0]      syn_d_res [1][L];
  logic [0:0]        syn_d_take;
  logic [W-1:0]      syn_g_idx  [L][N];
  logic [N-1:0]      syn_g_zero [L];
  logic [W-1:0]      syn_h_idx  [L][N];
  logic [N-1:0]      syn_h_zero [L];
  logic              rec_valid;
  logic [W-1:0]      rec_even_res [L];
  logic [W-1:0]      rec_odd_res  [L];
  logic              rec_bin_valid;
  logic [OW-1:0]     rec_even_bin, rec_odd_bin;

  rns_dwt_top #(.B_IN(B), .N_TAPS(N), .NUM_MOD(L), .MODULI(MOD), .W(W)) dut (.*);

  // synthesis takes the last octave's outputs
  assign syn_valid = a_valid;
  assign syn_a_res = a_res;
  assign syn_d_res[0] = d_res[OCT-1];



  // ------------------------------------------------------------ bookkeeping
  int n_zero_sample = 0, n_zero_coef = 0, n_negative = 0, n_gap = 0;
  int n_octave2 = 0, n_haar = 0, n_binary = 0;

  // captured outputs, as residue vectors packed into longint per channel
  typedef logic [W-1:0] resv_t [L];
  resv_t  cap_d [OCT][$];
  resv_t  cap_a [$];
  resv_t  cap_re [$], cap_ro [$];
  logic [OW-1:0] cap_db [OCT][$];
  logic [OW-1:0] cap_ab [$], cap_reb [$], cap_rob [$];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < OCT; o++) begin
        if (d_valid[o])     cap_d[o].push_back(d_res[o]);
        if (d_bin_valid[o]) cap_db[o].push_back(d_bin[o]);
      end
      if (a_valid)       cap_a.push_back(a_res);
      if (a_bin_valid)   cap_ab.push_back(a_bin);
      if (rec_valid)     begin cap_re.push_back(rec_even_res); cap_ro.push_back(rec_odd_res); end
      if (rec_bin_valid) begin cap_reb.push_back(rec_even_bin); cap_rob.push_back(rec_odd_bin); end
    end
  end

  // ----------------------------------------------------------------- model
  longint xs [S];
  longint sq [OCT+1][S];     // sq[o] is the input of octave o
  longint av [OCT][S/2], dv [OCT][S/2];
  longint ye [S], yo [S];
  int     len [OCT+1];
  int     ga [N], ha [N], gs [N], hs [N];

  task automatic load_coefs();
    for (int j = 0; j < L; j++)
      for (int k = 0; k < N; k++) begin
        int r;
        r = int'(smod(ga[k], MOD[j]));
        ana_g_zero[j][k] = (r == 0);
        ana_g_idx[j][k]  = (r == 0) ? '0 : W'(dlog(MOD[j], r));
        if (r == 0) n_zero_coef++;
        r = int'(smod(ha[k], MOD[j]));
        ana_h_zero[j][k] = (r == 0);
        ana_h_idx[j][k]  = (r == 0) ? '0 : W'(dlog(MOD[j], r));
        r = int'(smod(gs[k], MOD[j]));
        syn_g_zero[j][k] = (r == 0);
        syn_g_idx[j][k]  = (r == 0) ? '0 : W'(dlog(MOD[j], r));
        r = int'(smod(hs[k], MOD[j]));
        syn_h_zero[j][k] = (r == 0);
        syn_h_idx[j][k]  = (r == 0) ? '0 : W'(dlog(MOD[j], r));
      end
  endtask

  task automatic run_model();
    for (int i = 0; i < S; i++) sq[0][i] = xs[i];
    len[0] = S;
    for (int o = 0; o < OCT; o++) begin
      len[o+1] = len[o] / 2;
      for (int n = 0; n < len[o+1]; n++) begin
        longint sa, sd;
        sa = 0; sd = 0;
        for (int k = 0; k < N; k++)
          if (2*n - k >= 0) begin
            sa += ga[k] * sq[o][2*n-k];
            sd += ha[k] * sq[o][2*n-k];
          end
        av[o][n] = sa;
        dv[o][n] = sd;
        sq[o+1][n] = sa;
      end
    end
    for (int n = 0; n < len[OCT]; n++) begin
      ye[n] = 0; yo[n] = 0;
      for (int l = 0; l < N/2; l++)
        if (n - l >= 0) begin
          ye[n] += gs[2*l]   * av[OCT-1][n-l] + hs[2*l]   * dv[OCT-1][n-l];
          yo[n] += gs[2*l+1] * av[OCT-1][n-l] + hs[2*l+1] * dv[OCT-1][n-l];
        end
    end
  endtask

  function automatic bit res_ok(input resv_t r, input longint v);
    for (int j = 0; j < L; j++)
      if (longint'(r[j]) != smod(v, MOD[j])) return 0;
    return 1;
  endfunction

  function automatic bit bin_ok(input logic [OW-1:0] b, input longint v);
    longint w, want, diff;
    w = smod(v, BIGM);
    if (w >= (BIGM + 1) / 2) w -= BIGM;
    want = (w * 65536 + (w >= 0 ? BIGM / 2 : -(BIGM / 2))) / BIGM;
    diff = longint'($signed(b - OW'(want)));
    return diff <= L/2 + 1 && diff >= -(L/2 + 1);
  endfunction

  task automatic check_seq(input string what, input resv_t got [$], input logic [OW-1:0] gotb [$],
                           input longint want [S], input int n_want, input int oct);
    checks++;
    if (got.size() != n_want || gotb.size() != n_want) begin
      failures++;
      $display("%s: %0d/%0d outputs, %0d expected", what, got.size(), gotb.size(), n_want);
    end
    for (int n = 0; n < n_want && n < got.size() && n < gotb.size(); n++) begin
      checks += 2;
      if (!res_ok(got[n], want[n])) begin
        failures++;
        $display("%s[%0d]: residues wrong, value %0d", what, n, want[n]);
      end
      if (!bin_ok(gotb[n], want[n])) begin
        failures++;
        $display("%s[%0d]: binary %0d for value %0d", what, n, $signed(gotb[n]), want[n]);
      end
      n_binary++;
      if (want[n] < 0) n_negative++;
      if (oct == 1) n_octave2++;
    end
  endtask

  // --------------------------------------------------------------- stimulus
  initial begin
    longint tmp [S];
    longint lim;
    rst_n   = 0;
    x_valid = 0;
    for (int k = 0; k < N; k++) begin
      ga[k] = (k == 1) ? int'(MOD[0]) * 3 : $urandom_range(0, (1 << CB) - 1) - (1 << (CB - 1));
      ha[k] = $urandom_range(0, (1 << CB) - 1) - (1 << (CB - 1));
      gs[k] = $urandom_range(0, (1 << CB) - 1) - (1 << (CB - 1));
      hs[k] = $urandom_range(0, (1 << CB) - 1) - (1 << (CB - 1));
    end
    load_coefs();
    for (int i = 0; i < S; i++) begin
      xs[i] = (i < 8) ? -(longint'(1) << (B - 1)) : longint'($urandom_range(0, (1 << B) - 1)) - (longint'(1) << (B - 1));
      for (int j = 0; j < L; j++) if (smod(xs[i], MOD[j]) == 0) begin n_zero_sample++; break; end
    end
    run_model();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < S; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin
        x_valid = 0;
        n_gap++;
        @(negedge clk);
      end
      x_valid = 1;
      x = B'(xs[i]);
    end
    @(negedge clk);
    x_valid = 0;
    repeat (40) @(negedge clk);

    // the analysis outputs must stay inside the signed dynamic range
    lim = BIGM / 2;
    for (int n = 0; n < S/2; n++) begin
      checks++;
      if (av[0][n] >= lim || av[0][n] < -lim || dv[0][n] >= lim || dv[0][n] < -lim) begin
        failures++;
        $display("output %0d outside the dynamic range", n);
      end
    end
    for (int n = 0; n < S/2; n++) tmp[n] = dv[0][n];
    check_seq("d1", cap_d[0], cap_db[0], tmp, len[1], 0);
    for (int n = 0; n < S/2; n++) tmp[n] = av[0][n];
    check_seq("a1", cap_a, cap_ab, tmp, len[1], 0);
    for (int n = 0; n < S; n++) tmp[n] = (n < len[1]) ? ye[n] : 0;
    check_seq("rec_even", cap_re, cap_reb, tmp, len[1], -1);
    for (int n = 0; n < S; n++) tmp[n] = (n < len[1]) ? yo[n] : 0;
    check_seq("rec_odd", cap_ro, cap_rob, tmp, len[1], -1);
    $display("[%0d,%0d] %0d taps, %0d moduli: checks=%0d failures=%0d (zero samples %0d, zero coefficients %0d, negative results %0d, gaps %0d)",
             B, CB, N, L, checks, failures, n_zero_sample, n_zero_coef, n_negative, n_gap);
    done = 1;
  end
endmodule
