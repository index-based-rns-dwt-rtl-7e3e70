// tb_rns_inv_index_lut: checks the inverse index table for M = 17 and
// M = 59: index i must map to g^i mod M for the smallest primitive root g.
module tb_rns_inv_index_lut;
  import tb_rns_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [4:0] i5, q5;
  logic [5:0] i6, q6;

  rns_inv_index_lut #(.M(17), .W(5)) dut17 (.idx(i5), .q(q5));
  rns_inv_index_lut #(.M(59), .W(6)) dut59 (.idx(i6), .q(q6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      i5 = 5'(i);
      #1;
      checks++;
      if (longint'(q5) != powmod(root_of(17), i, 17)) begin
        failures++;
        $display("M=17 i=%0d: q=%0d", i, q5);
      end
    end
    for (int i = 0; i < 58; i++) begin
      i6 = 6'(i);
      #1;
      checks++;
      if (longint'(q6) != powmod(root_of(59), i, 59)) begin
        failures++;
        $display("M=59 i=%0d: q=%0d", i, q6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
