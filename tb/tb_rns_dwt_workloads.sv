// tb_rns_dwt_workloads: runs every filter-bank configuration of the published
// comparison through the RNS filter bank, each as its own instance:
//   8 taps: [8,10,21] {31,29,23,19,17}, [10,10,23] {61,59,53,47},
//           [12,12,27] {61,59,53,47,43}, [14,12,29] {61,59,53,47,43,41};
//   4 taps: [8,9,19], [8,10,20], [9,10,21], [10,10,22] with {61,59,53,47},
//           [12,12,26], [14,12,28] with {61,59,53,47,43};
// where [x,y,z] is x-bit input, y-bit coefficients, z-bit output. Each
// instance (tb_rns_dwt_cfg_run) checks analysis and synthesis outputs against
// an integer model; this module adds up their counts.
module tb_rns_dwt_workloads;
  localparam int NCFG = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int c [NCFG];
  int f [NCFG];

  localparam int unsigned M5A [5] = '{31, 29, 23, 19, 17};
  localparam int unsigned M4  [4] = '{61, 59, 53, 47};
  localparam int unsigned M5  [5] = '{61, 59, 53, 47, 43};
  localparam int unsigned M6  [6] = '{61, 59, 53, 47, 43, 41};

  tb_rns_dwt_cfg_run #(.B(8),  .CB(10), .N(8), .L(5), .W(5), .MOD(M5A)) t1_r1 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_rns_dwt_cfg_run #(.B(10), .CB(10), .N(8), .L(4), .W(6), .MOD(M4))  t1_r2 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_rns_dwt_cfg_run #(.B(12), .CB(12), .N(8), .L(5), .W(6), .MOD(M5))  t1_r3 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_rns_dwt_cfg_run #(.B(14), .CB(12), .N(8), .L(6), .W(6), .MOD(M6))  t1_r4 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_rns_dwt_cfg_run #(.B(8),  .CB(9),  .N(4), .L(4), .W(6), .MOD(M4))  t2_r1 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));
  tb_rns_dwt_cfg_run #(.B(8),  .CB(10), .N(4), .L(4), .W(6), .MOD(M4))  t2_r2 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]));
  tb_rns_dwt_cfg_run #(.B(9),  .CB(10), .N(4), .L(4), .W(6), .MOD(M4))  t2_r3 (.clk, .done(done[6]), .checks(c[6]), .failures(f[6]));
  tb_rns_dwt_cfg_run #(.B(10), .CB(10), .N(4), .L(4), .W(6), .MOD(M4))  t2_r4 (.clk, .done(done[7]), .checks(c[7]), .failures(f[7]));
  tb_rns_dwt_cfg_run #(.B(12), .CB(12), .N(4), .L(5), .W(6), .MOD(M5))  t2_r5 (.clk, .done(done[8]), .checks(c[8]), .failures(f[8]));
  tb_rns_dwt_cfg_run #(.B(14), .CB(12), .N(4), .L(5), .W(6), .MOD(M5))  t2_r6 (.clk, .done(done[9]), .checks(c[9]), .failures(f[9]));

  int checks = 0, failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    #1;
    for (int i = 0; i < NCFG; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
