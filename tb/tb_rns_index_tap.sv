// tb_rns_index_tap: checks one index-domain product for M = 29 over all
// sample/coefficient pairs: the registered product must equal x*c mod 29
// one clock after en, zero samples and zero coefficients must clear it, and
// the register must hold while en is low.
module tb_rns_index_tap;
  import tb_rns_ref_pkg::*;
  localparam int M = 29;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, en = 0;
  logic [4:0] x_idx = 0, c_idx = 0, p;
  logic       x_zero = 0, c_zero = 0;

  rns_index_tap #(.M(M), .W(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] held;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < M; x++)
      for (int c = 0; c < M; c++) begin
        @(negedge clk);
        en     = 1;
        x_zero = (x == 0);
        c_zero = (c == 0);
        x_idx  = (x == 0) ? 5'($urandom_range(0, M - 2)) : 5'(dlog(M, x));
        c_idx  = (c == 0) ? 5'($urandom_range(0, M - 2)) : 5'(dlog(M, c));
        @(negedge clk);
        en = 0;
        checks++;
        if (int'(p) != (x * c) % M) begin
          failures++;
          $display("%0d * %0d gave %0d", x, c, p);
        end
        // hold while en is low
        held  = p;
        x_idx = 5'($urandom_range(0, M - 2));
        x_zero = 0;
        @(negedge clk);
        if ((x * 7 + c) % 50 == 0) begin
          checks++;
          if (p != held) begin
            failures++;
            $display("register changed while en was low");
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
