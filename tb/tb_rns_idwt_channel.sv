// tb_rns_idwt_channel: random test of one synthesis channel (M = 23,
// 8 taps). Every reconstructed pair is checked against
//   y_(2n)   = sum_l gs_(2l) a_(n-l)   + hs_(2l) d_(n-l)   mod M
//   y_(2n+1) = sum_l gs_(2l+1) a_(n-l) + hs_(2l+1) d_(n-l) mod M
// and must appear exactly two clocks after its input pair.
module tb_rns_idwt_channel;
  import tb_rns_ref_pkg::*;
  localparam int M = 23, W = 5, N = 8, STEPS = 300;
  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0]  in_a = 0, in_d = 0;
  logic [W-1:0]  g_idx [N];
  logic [N-1:0]  g_zero;
  logic [W-1:0]  h_idx [N];
  logic [N-1:0]  h_zero;
  logic          out_valid;
  logic [W-1:0]  out_even, out_odd;

  rns_idwt_channel #(.M(M), .W(W), .N_TAPS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g [N], h [N];
  int as [STEPS], ds [STEPS];
  int cycle = 0, exp_cycle [$], exp_e [$], exp_o [$];

  function automatic int rand_res();
    return ($urandom_range(0, 7) == 0) ? 0 : $urandom_range(0, M - 1);
  endfunction

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      checks++;
      if (exp_cycle.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        int ec, ee, eo;
        ec = exp_cycle.pop_front(); ee = exp_e.pop_front(); eo = exp_o.pop_front();
        if (ec != cycle || int'(out_even) != ee || int'(out_odd) != eo) begin
          failures++;
          $display("cycle %0d (exp %0d): even=%0d/%0d odd=%0d/%0d", cycle, ec, out_even, ee, out_odd, eo);
        end
      end
    end
  end

  initial begin
    for (int set = 0; set < 4; set++) begin
      rst_n = 0;
      in_valid = 0;
      for (int k = 0; k < N; k++) begin
        g[k] = (set == 0 && k == 5) ? 0 : rand_res();
        h[k] = rand_res();
        g_zero[k] = (g[k] == 0);
        h_zero[k] = (h[k] == 0);
        g_idx[k]  = (g[k] == 0) ? W'($urandom_range(0, M - 2)) : W'(dlog(M, g[k]));
        h_idx[k]  = (h[k] == 0) ? W'($urandom_range(0, M - 2)) : W'(dlog(M, h[k]));
      end
      for (int i = 0; i < STEPS; i++) begin
        as[i] = rand_res();
        ds[i] = rand_res();
      end
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < STEPS; n++) begin
        int se, so;
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_a = W'(as[n]);
        in_d = W'(ds[n]);
        se = 0; so = 0;
        for (int l = 0; l < N/2; l++)
          if (n - l >= 0) begin
            se += g[2*l]   * as[n-l] + h[2*l]   * ds[n-l];
            so += g[2*l+1] * as[n-l] + h[2*l+1] * ds[n-l];
          end
        exp_cycle.push_back(cycle + 3);
        exp_e.push_back(se % M);
        exp_o.push_back(so % M);
      end
      @(negedge clk);
      in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (exp_cycle.size() != 0) begin
        failures++;
        $display("%0d outputs missing", exp_cycle.size());
        exp_cycle.delete(); exp_e.delete(); exp_o.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
