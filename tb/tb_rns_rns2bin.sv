// tb_rns_rns2bin: checks the scaled RNS-to-binary converter for the moduli
// {31, 29, 23, 19, 17} and a 16-bit output. Random X across the whole signed
// range [-M/2, M/2), plus its ends and zero, are fed as residues one per
// clock; the output must be within 3 units (NUM_MOD/2 rounded up, plus one)
// of X * 2^16 / M and appear exactly 4 clocks later.
module tb_rns_rns2bin;
  import tb_rns_ref_pkg::*;
  localparam int unsigned MA [5] = '{31, 29, 23, 19, 17};
  localparam longint BIGM = 31 * 29 * 23 * 19 * 17;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [4:0]  in_res [5];
  logic        out_valid;
  logic [15:0] out_bin;

  rns_rns2bin #(.NUM_MOD(5), .MODULI(MA), .W(5), .OUT_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0, q_c [$];
  longint q_x [$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      int c;
      longint x, want, diff;
      checks++;
      c = q_c.pop_front(); x = q_x.pop_front();
      // exact scaled value, rounded to nearest, then compared modulo 2^16
      want = (x * 65536 + (x >= 0 ? BIGM / 2 : -(BIGM / 2))) / BIGM;
      diff = longint'($signed(out_bin - 16'(want)));
      if (c != cycle || diff > 3 || diff < -3) begin
        failures++;
        $display("X=%0d: got %0d want %0d (cycle %0d/%0d)", x, $signed(out_bin), want, cycle, c);
      end
    end
  end

  initial begin
    for (int j = 0; j < 5; j++) in_res[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      longint x;
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      case (i)
        0: x = -(BIGM / 2);
        1: x = BIGM / 2;
        2: x = 0;
        3: x = -1;
        default: x = longint'($urandom_range(0, 32'(BIGM - 1))) - BIGM / 2;
      endcase
      for (int j = 0; j < 5; j++) in_res[j] = 5'(smod(x, MA[j]));
      if (in_valid) begin
        q_c.push_back(cycle + 5);
        q_x.push_back(x);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q_c.size() != 0) begin
      failures++;
      $display("results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
