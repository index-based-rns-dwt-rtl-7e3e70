// tb_rns_mod_add: exhaustive check of the modular adder for M = 31 (a
// residue adder) and M = 60 (the index adder of modulus 61).
module tb_rns_mod_add;
  int checks = 0, failures = 0;

  logic [4:0] a5, b5, s5;
  logic [5:0] a6, b6, s6;

  rns_mod_add #(.M(31), .W(5)) dut31 (.a(a5), .b(b5), .s(s5));
  rns_mod_add #(.M(60), .W(6)) dut60 (.a(a6), .b(b6), .s(s6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 31; a++)
      for (int b = 0; b < 31; b++) begin
        a5 = 5'(a); b5 = 5'(b);
        #1;
        checks++;
        if (int'(s5) != (a + b) % 31) begin
          failures++;
          $display("M=31: %0d + %0d gave %0d", a, b, s5);
        end
      end
    for (int a = 0; a < 60; a++)
      for (int b = 0; b < 60; b++) begin
        a6 = 6'(a); b6 = 6'(b);
        #1;
        checks++;
        if (int'(s6) != (a + b) % 60) begin
          failures++;
          $display("M=60: %0d + %0d gave %0d", a, b, s6);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
