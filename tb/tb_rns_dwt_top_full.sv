// tb_rns_dwt_top_full: one complete operation of the RNS wavelet filter bank
// in its default configuration (one octave, moduli {31, 29, 23, 19, 17},
// 8 taps, 8-bit input, 16-bit scaled outputs), with no parameter changed.
//
// The synthesis octave is fed from the analysis outputs, so it rebuilds the
// input signal. Three coefficient sets are run, each after a reset:
//   0  Haar pair g = {1, 1}, h = {1, -1}, synthesis gs = {1, 1}, hs = {1, -1},
//      all other taps zero: the reconstruction must equal twice the input
//      (even samples aligned, odd samples one step behind);
//   1  random 10-bit coefficients, one of them a multiple of 31;
//   2  the 8-tap Daubechies filter quantised to 10 bits (scale 512).
// Every residue output is compared with an integer model of the transform
// reduced modulo each m_j; every scaled binary output with the model value
// wrapped into the signed dynamic range and scaled by 2^16 / M (3 units of
// tolerance). The same mechanisms as in the two-octave test are counted,
// except the second octave. Set 2 streams one sample per clock with no gaps
// and checks that an output pair then appears every second clock.
module tb_rns_dwt_top_full;
  import tb_rns_ref_pkg::*;
  localparam int OCT = 1;
  localparam int L = 5, W = 5, N = 8, B = 8, OW = 16, S = 256;
  localparam int unsigned MOD [L] = '{31, 29, 23, 19, 17};
  localparam longint BIGM = 31 * 29 * 23 * 19 * 17;

  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0;
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

  rns_dwt_top dut (.*);

  // synthesis takes the last octave's outputs
  assign syn_valid = a_valid;
  assign syn_a_res = a_res;
  assign syn_d_res[0] = d_res[OCT-1];

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bookkeeping
  int n_zero_sample = 0, n_zero_coef = 0, n_negative = 0, n_gap = 0;
  int n_octave2 = 0, n_haar = 0, n_binary = 0;

  // throughput: cycles at which the first-octave detail outputs appear
  int cycle = 0, first_d = -1, last_d = -1;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && d_valid[0]) begin
      if (first_d < 0) first_d = cycle;
      last_d = cycle;
    end
  end

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
    return diff <= 3 && diff >= -3;
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
  localparam int DB4 [N] = '{118, 366, 323, -14, -96, 16, 17, -5};

  initial begin
    longint tmp [S];
    for (int set = 0; set < 3; set++) begin
      rst_n   = 0;
      x_valid = 0;
      for (int k = 0; k < N; k++) begin
        case (set)
          0: begin
            ga[k] = (k < 2) ? 1 : 0;
            ha[k] = (k == 0) ? 1 : (k == 1 ? -1 : 0);
            gs[k] = (k < 2) ? 1 : 0;
            hs[k] = (k == 0) ? 1 : (k == 1 ? -1 : 0);
          end
          1: begin
            ga[k] = (k == 2) ? 31 * 7 : $urandom_range(0, 1023) - 512;
            ha[k] = $urandom_range(0, 1023) - 512;
            gs[k] = $urandom_range(0, 1023) - 512;
            hs[k] = $urandom_range(0, 1023) - 512;
          end
          default: begin
            ga[k] = DB4[k];
            ha[k] = (k % 2 == 0) ? DB4[N-1-k] : -DB4[N-1-k];
            gs[k] = DB4[N-1-k];
            hs[k] = (k % 2 == 0) ? -DB4[k] : DB4[k];
          end
        endcase
      end
      load_coefs();
      for (int i = 0; i < S; i++) begin
        int r;
        r = $urandom_range(0, 9);
        xs[i] = (r == 0) ? 0 : (r == 1 ? 31 * ($urandom_range(0, 6) - 3) : longint'($urandom_range(0, 255)) - 128);
        for (int j = 0; j < L; j++) if (smod(xs[i], MOD[j]) == 0) begin n_zero_sample++; break; end
      end
      run_model();
      for (int o = 0; o < OCT; o++) begin cap_d[o].delete(); cap_db[o].delete(); end
      cap_a.delete(); cap_ab.delete(); cap_re.delete(); cap_ro.delete(); cap_reb.delete(); cap_rob.delete();

      repeat (3) @(negedge clk);
      first_d = -1;
      rst_n = 1;
      for (int i = 0; i < S; i++) begin
        @(negedge clk);
        while (set != 2 && $urandom_range(0, 4) == 0) begin
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

      for (int o = 0; o < OCT; o++) begin
        for (int n = 0; n < S/2; n++) tmp[n] = dv[o][n];
        check_seq($sformatf("set%0d d%0d", set, o + 1), cap_d[o], cap_db[o], tmp, len[o+1], o);
      end
      for (int n = 0; n < S/2; n++) tmp[n] = av[OCT-1][n];
      check_seq($sformatf("set%0d a%0d", set, OCT), cap_a, cap_ab, tmp, len[OCT], OCT - 1);
      for (int n = 0; n < S; n++) tmp[n] = (n < len[OCT]) ? ye[n] : 0;
      check_seq($sformatf("set%0d rec_even", set), cap_re, cap_reb, tmp, len[OCT], -1);
      for (int n = 0; n < S; n++) tmp[n] = (n < len[OCT]) ? yo[n] : 0;
      check_seq($sformatf("set%0d rec_odd", set), cap_ro, cap_rob, tmp, len[OCT], -1);

      // set 2 streams one sample per clock without gaps: the filter bank must
      // keep up, giving a first-octave output every second clock
      if (set == 2) begin
        checks++;
        if (last_d - first_d != S - 2) begin
          failures++;
          $display("throughput: %0d outputs spread over %0d clocks", len[1], last_d - first_d);
        end
      end

      // Haar: the reconstruction is twice the signal the last octave analysed
      if (set == 0) begin
        for (int n = 0; n < len[OCT] && n < cap_re.size(); n++) begin
          checks++;
          if (!res_ok(cap_re[n], 2 * sq[OCT-1][2*n]) ||
              (n > 0 && !res_ok(cap_ro[n], 2 * sq[OCT-1][2*n-1]))) begin
            failures++;
            $display("Haar reconstruction wrong at %0d", n);
          end else n_haar++;
        end
      end
    end

    $display("mechanisms: zero samples %0d, zero coefficients %0d, negative results %0d, input gaps %0d, octave-2 outputs %0d, Haar reconstructions %0d, binary outputs %0d",
             n_zero_sample, n_zero_coef, n_negative, n_gap, n_octave2, n_haar, n_binary);
    if (n_zero_sample == 0 || n_zero_coef == 0 || n_negative == 0 || n_gap == 0 ||
        (OCT > 1 && n_octave2 == 0) || n_haar == 0 || n_binary == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
