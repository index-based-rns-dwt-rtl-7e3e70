// tb_rns_adder_tree: random check of the modular adder tree with 8 inputs
// (M = 31) and 5 inputs (M = 53, padded tree).
module tb_rns_adder_tree;
  int checks = 0, failures = 0;

  logic [4:0] x8 [8];
  logic [4:0] s8;
  logic [5:0] x5 [5];
  logic [5:0] s5;

  rns_adder_tree #(.M(31), .W(5), .N(8)) dut8 (.x(x8), .s(s8));
  rns_adder_tree #(.M(53), .W(6), .N(5)) dut5 (.x(x5), .s(s5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int t = 0; t < 2000; t++) begin
      sum = 0;
      for (int i = 0; i < 8; i++) begin
        x8[i] = 5'((t < 10) ? 30 : $urandom_range(0, 30));
        sum += int'(x8[i]);
      end
      #1;
      checks++;
      if (int'(s8) != sum % 31) begin
        failures++;
        $display("N=8: sum %0d gave %0d", sum, s8);
      end
      sum = 0;
      for (int i = 0; i < 5; i++) begin
        x5[i] = 6'((t < 10) ? 52 : $urandom_range(0, 52));
        sum += int'(x5[i]);
      end
      #1;
      checks++;
      if (int'(s5) != sum % 53) begin
        failures++;
        $display("N=5: sum %0d gave %0d", sum, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
