// tb_rns_index_lut: checks the index table for M = 31 and M = 61: every
// non-zero residue must map to its discrete logarithm (base: smallest
// primitive root), and only zero may raise the zero flag.
module tb_rns_index_lut;
  import tb_rns_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [4:0] q5, i5;
  logic [5:0] q6, i6;
  logic       z5, z6;

  rns_index_lut #(.M(31), .W(5)) dut31 (.q(q5), .idx(i5), .is_zero(z5));
  rns_index_lut #(.M(61), .W(6)) dut61 (.q(q6), .idx(i6), .is_zero(z6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 31; q++) begin
      q5 = 5'(q);
      #1;
      checks++;
      if (q == 0 ? !z5 : (z5 || int'(i5) != dlog(31, q))) begin
        failures++;
        $display("M=31 q=%0d: idx=%0d zero=%0d", q, i5, z5);
      end
    end
    for (int q = 0; q < 61; q++) begin
      q6 = 6'(q);
      #1;
      checks++;
      if (q == 0 ? !z6 : (z6 || int'(i6) != dlog(61, q))) begin
        failures++;
        $display("M=61 q=%0d: idx=%0d zero=%0d", q, i6, z6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
