// tb_rns_dwt_top: end-to-end test of the RNS wavelet filter bank with two
// analysis octaves and two chained synthesis octaves (moduli
// {31, 29, 23, 19, 17}, 8 taps, 8-bit input).
//
// The coarse synthesis octave is fed from the analysis outputs of the last
// octave (approximation and detail); the fine one takes its approximation
// from the coarse one and its detail, on each syn_d_take[1] strobe, from the
// model's first-octave detail sequence. Three coefficient sets are run, each
// after a reset:
//   0  Haar pair g = {1, 1}, h = {1, -1}, synthesis gs = {1, 1},
//      hs = {-1, 1}, all other taps zero. The fine octave gets its detail
//      doubled and one step late, which makes the whole chain a perfect
//      reconstruction: output sample j must be 4 x_(j-3);
//   1  random 10-bit coefficients, one of them a multiple of 31;
//   2  the 8-tap Daubechies filter quantised to 10 bits (scale 512).
// Every residue output is compared with an integer model of the transform
// reduced modulo each m_j; every scaled binary output with the model value
// wrapped into the signed dynamic range and scaled by 2^16 / M (3 units of
// tolerance). Mechanisms counted (each must occur): zero samples cleared in
// the products, zero coefficients, negative results, gaps in the input
// stream, second-octave outputs, chained synthesis steps, exact Haar
// reconstruction, binary outputs. Set 2 streams one sample per clock with no
// gaps and checks that the first octave then delivers one output pair every
// second clock.
module tb_rns_dwt_top;
  import tb_rns_ref_pkg::*;
  localparam int OCT = 2, SYN = 2;
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
  logic [W-1:0]      syn_d_res [SYN][L];
  logic [SYN-1:0]    syn_d_take;
  logic [W-1:0]      syn_g_idx  [L][N];
  logic [N-1:0]      syn_g_zero [L];
  logic [W-1:0]      syn_h_idx  [L][N];
  logic [N-1:0]      syn_h_zero [L];
  logic              rec_valid;
  logic [W-1:0]      rec_even_res [L];
  logic [W-1:0]      rec_odd_res  [L];
  logic              rec_bin_valid;
  logic [OW-1:0]     rec_even_bin, rec_odd_bin;

  rns_dwt_top #(.OCTAVES(OCT), .SYN_OCTAVES(SYN)) dut (.*);

  // the coarse synthesis octave takes the last analysis octave's outputs,
  // the finer ones a detail sample from the model per syn_d_take strobe
  logic [W-1:0] fine_d [SYN][L];
  assign syn_valid = a_valid;
  assign syn_a_res = a_res;
  always_comb begin
    syn_d_res[0] = d_res[OCT-1];
    for (int s = 1; s < SYN; s++) syn_d_res[s] = fine_d[s];
  end

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
  int n_octave2 = 0, n_haar = 0, n_binary = 0, n_chained = 0;

  // detail samples taken by each synthesis octave after the first
  int take_n [SYN];
  always @(posedge clk)
    for (int s = 1; s < SYN; s++)
      if (rst_n && syn_d_take[s]) take_n[s]++;

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
  longint sa_in [SYN][S], sd_in [SYN][S];   // synthesis octave inputs
  longint ye [S], yo [S];                    // last synthesis octave outputs
  int     len [OCT+1], rlen;
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
    rlen = len[OCT];
    for (int n = 0; n < rlen; n++) begin
      sa_in[0][n] = av[OCT-1][n];
      sd_in[0][n] = dv[OCT-1][n];
    end
    for (int s = 0; s < SYN; s++) begin
      if (s > 0)
        for (int k = 0; k < rlen; k++)
          sd_in[s][k] = haar_feed ? (k > 0 ? 2 * dv[OCT-1-s][k-1] : 0) : dv[OCT-1-s][k];
      for (int n = 0; n < rlen; n++) begin
        ye[n] = 0; yo[n] = 0;
        for (int l = 0; l < N/2; l++)
          if (n - l >= 0) begin
            ye[n] += gs[2*l]   * sa_in[s][n-l] + hs[2*l]   * sd_in[s][n-l];
            yo[n] += gs[2*l+1] * sa_in[s][n-l] + hs[2*l+1] * sd_in[s][n-l];
          end
      end
      if (s + 1 < SYN) begin
        for (int n = 0; n < rlen; n++) begin
          sa_in[s+1][2*n]   = ye[n];
          sa_in[s+1][2*n+1] = yo[n];
        end
        rlen = 2 * rlen;
      end
    end
  endtask

  bit haar_feed;

  // detail input of the finer synthesis octaves, from the model
  always @(negedge clk)
    for (int s = 1; s < SYN; s++)
      for (int j = 0; j < L; j++)
        fine_d[s][j] = (take_n[s] < S) ? W'(smod(sd_in[s][take_n[s]], MOD[j])) : '0;

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
            hs[k] = (k == 0) ? -1 : (k == 1 ? 1 : 0);
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
      haar_feed = (set == 0);
      run_model();
      for (int o = 0; o < OCT; o++) begin cap_d[o].delete(); cap_db[o].delete(); end
      cap_a.delete(); cap_ab.delete(); cap_re.delete(); cap_ro.delete(); cap_reb.delete(); cap_rob.delete();

      repeat (3) @(negedge clk);
      first_d = -1;
      for (int s = 0; s < SYN; s++) take_n[s] = 0;
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
      for (int n = 0; n < S; n++) tmp[n] = (n < rlen) ? ye[n] : 0;
      check_seq($sformatf("set%0d rec_even", set), cap_re, cap_reb, tmp, rlen, -1);
      for (int n = 0; n < S; n++) tmp[n] = (n < rlen) ? yo[n] : 0;
      check_seq($sformatf("set%0d rec_odd", set), cap_ro, cap_rob, tmp, rlen, -1);

      // every finer synthesis octave took its whole detail sequence
      for (int s = 1; s < SYN; s++) begin
        checks++;
        if (take_n[s] != len[OCT-s]) begin
          failures++;
          $display("synthesis octave %0d took %0d detail samples, %0d expected", s, take_n[s], len[OCT-s]);
        end
        n_chained += take_n[s];
      end

      // set 2 streams one sample per clock without gaps: the filter bank must
      // keep up, giving a first-octave output every second clock
      if (set == 2) begin
        checks++;
        if (last_d - first_d != S - 2) begin
          failures++;
          $display("throughput: %0d outputs spread over %0d clocks", len[1], last_d - first_d);
        end
      end

      // Haar: the chain rebuilds the input, 4 x_(j-3) at output sample j
      if (set == 0) begin
        for (int n = 0; n < rlen && n < cap_re.size(); n++) begin
          checks++;
          if (!res_ok(cap_re[n], (2*n >= 3) ? 4 * xs[2*n-3] : 0) ||
              !res_ok(cap_ro[n], (2*n >= 2) ? 4 * xs[2*n-2] : 0)) begin
            failures++;
            $display("Haar reconstruction wrong at %0d", n);
          end else n_haar++;
        end
      end
    end

    $display("mechanisms: zero samples %0d, zero coefficients %0d, negative results %0d, input gaps %0d, octave-2 outputs %0d, chained synthesis steps %0d, Haar reconstructions %0d, binary outputs %0d",
             n_zero_sample, n_zero_coef, n_negative, n_gap, n_octave2, n_chained, n_haar, n_binary);
    if (n_zero_sample == 0 || n_zero_coef == 0 || n_negative == 0 || n_gap == 0 ||
        (OCT > 1 && n_octave2 == 0) || (SYN > 1 && n_chained == 0) || n_haar == 0 || n_binary == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
