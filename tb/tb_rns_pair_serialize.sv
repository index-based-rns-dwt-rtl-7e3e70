// tb_rns_pair_serialize: sends numbered sample pairs with random spacing of
// two or more cycles (random garbage on the inputs in between) and checks
// that sample 2n leaves the cycle after its pair was taken and sample 2n+1
// the cycle after that, with no other output cycles.
module tb_rns_pair_serialize;
  localparam int L = 3, NP = 200;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic [5:0] in_even [L];
  logic [5:0] in_odd  [L];
  logic       out_valid;
  logic [5:0] out_res [L];

  rns_pair_serialize #(.NUM_MOD(L), .W(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample s carries residues (s + 5j) mod 64 in channel j
  int  got = 0;
  bit  exp1 = 0, exp2 = 0;     // an output is due one / two cycles from now
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != exp1) begin
        failures++;
        $display("out_valid=%0d, expected %0d", out_valid, exp1);
      end
      if (out_valid) begin
        for (int j = 0; j < L; j++) begin
          checks++;
          if (int'(out_res[j]) != (got + 5*j) % 64) begin
            failures++;
            $display("sample %0d ch %0d: %0d", got, j, out_res[j]);
          end
        end
        got++;
      end
      exp1 = exp2 || in_valid;
      exp2 = in_valid;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      in_valid = 1;
      for (int j = 0; j < L; j++) begin
        in_even[j] = 6'((2*p + 5*j) % 64);
        in_odd[j]  = 6'((2*p + 1 + 5*j) % 64);
      end
      // at least one idle cycle, more at random, with junk on the inputs
      do begin
        @(negedge clk);
        in_valid = 0;
        for (int j = 0; j < L; j++) begin
          in_even[j] = 6'($urandom);
          in_odd[j]  = 6'($urandom);
        end
      end while ($urandom_range(0, 2) == 0);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (got != 2*NP) begin
      failures++;
      $display("%0d samples out, %0d expected", got, 2*NP);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int j = 0; j < L; j++) begin in_even[j] = '0; in_odd[j] = '0; end
  end
endmodule
