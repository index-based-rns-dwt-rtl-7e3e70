// tb_rns_even_odd_split: drives a numbered residue stream with random gaps
// and checks that pair n carries samples 2n and 2n+1, one cycle after the
// odd sample.
module tb_rns_even_odd_split;
  localparam int L = 3;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic [5:0] in_res [L];
  logic       out_valid;
  logic [5:0] out_even [L];
  logic [5:0] out_odd  [L];

  rns_even_odd_split #(.NUM_MOD(L), .W(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, pairs = 0;
  bit expect_pair = 0;

  // sample s carries residues (s + j) mod 64 in channel j
  always @(posedge clk) begin
    if (rst_n) begin
      if (expect_pair != out_valid) begin
        failures++;
        $display("out_valid=%0d, expected %0d", out_valid, expect_pair);
      end
      if (out_valid) begin
        for (int j = 0; j < L; j++) begin
          checks++;
          if (int'(out_even[j]) != (2*pairs + j) % 64 || int'(out_odd[j]) != (2*pairs + 1 + j) % 64) begin
            failures++;
            $display("pair %0d ch %0d: %0d %0d", pairs, j, out_even[j], out_odd[j]);
          end
        end
        pairs++;
      end
      expect_pair = in_valid && (sent % 2 == 1);
      if (in_valid) sent++;
    end
  end

  initial begin
    for (int j = 0; j < L; j++) in_res[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < L; j++) in_res[j] = 6'((s + j) % 64);
      if (in_valid) s++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (pairs != 200) begin
      failures++;
      $display("got %0d pairs", pairs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
