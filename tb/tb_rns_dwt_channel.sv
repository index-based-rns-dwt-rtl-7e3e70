// tb_rns_dwt_channel: random test of one analysis channel (M = 31, 8 taps).
// Samples and coefficients are random residues with extra zeros; several
// coefficient sets are used, each after a reset. Every output pair is checked
// against the direct convolution a_n = sum_k g_k x_(2n-k) mod M (likewise d_n
// with h), and must appear exactly two clocks after its input pair.
module tb_rns_dwt_channel;
  import tb_rns_ref_pkg::*;
  localparam int M = 31, W = 5, N = 8, PAIRS = 300;
  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0]  in_even = 0, in_odd = 0;
  logic [W-1:0]  g_idx [N];
  logic [N-1:0]  g_zero;
  logic [W-1:0]  h_idx [N];
  logic [N-1:0]  h_zero;
  logic          out_valid;
  logic [W-1:0]  out_a, out_d;

  rns_dwt_channel #(.M(M), .W(W), .N_TAPS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g [N], h [N];
  int xs [2*PAIRS];
  int cycle = 0, exp_cycle [$], exp_a [$], exp_d [$];

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
        int ec, ea, ed;
        ec = exp_cycle.pop_front(); ea = exp_a.pop_front(); ed = exp_d.pop_front();
        if (ec != cycle || int'(out_a) != ea || int'(out_d) != ed) begin
          failures++;
          $display("cycle %0d (exp %0d): a=%0d/%0d d=%0d/%0d", cycle, ec, out_a, ea, out_d, ed);
        end
      end
    end
  end

  initial begin
    for (int set = 0; set < 4; set++) begin
      rst_n = 0;
      in_valid = 0;
      for (int k = 0; k < N; k++) begin
        g[k] = (set == 0 && k == 3) ? 0 : rand_res();
        h[k] = (set == 1) ? (k < 2 ? 1 : 0) : rand_res();
        g_zero[k] = (g[k] == 0);
        h_zero[k] = (h[k] == 0);
        g_idx[k]  = (g[k] == 0) ? W'($urandom_range(0, M - 2)) : W'(dlog(M, g[k]));
        h_idx[k]  = (h[k] == 0) ? W'($urandom_range(0, M - 2)) : W'(dlog(M, h[k]));
      end
      for (int i = 0; i < 2*PAIRS; i++) xs[i] = rand_res();
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < PAIRS; n++) begin
        int sa, sd;
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_even  = W'(xs[2*n]);
        in_odd   = W'(xs[2*n+1]);
        sa = 0; sd = 0;
        for (int k = 0; k < N; k++)
          if (2*n - k >= 0) begin
            sa += g[k] * xs[2*n - k];
            sd += h[k] * xs[2*n - k];
          end
        exp_cycle.push_back(cycle + 3);   // cycle counts the edge about to come
        exp_a.push_back(sa % M);
        exp_d.push_back(sd % M);
      end
      @(negedge clk);
      in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (exp_cycle.size() != 0) begin
        failures++;
        $display("%0d outputs missing", exp_cycle.size());
        exp_cycle.delete(); exp_a.delete(); exp_d.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
