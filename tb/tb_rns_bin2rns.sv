// tb_rns_bin2rns: checks the binary-to-RNS converter exhaustively for 8-bit
// input and moduli {31, 29, 23, 19, 17}, and at random for 14-bit input and
// moduli {61, 59, 53, 47, 43, 41}. Inputs are fed one per clock; each result
// must appear exactly two clocks later.
module tb_rns_bin2rns;
  import tb_rns_ref_pkg::*;
  localparam int unsigned MA [5] = '{31, 29, 23, 19, 17};
  localparam int unsigned MB [6] = '{61, 59, 53, 47, 43, 41};
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, va = 0, vb = 0;
  logic [7:0]  xa = 0;
  logic [13:0] xb = 0;
  logic        oa_valid, ob_valid;
  logic [4:0]  ra [5];
  logic [5:0]  rb [6];

  rns_bin2rns #(.B(8), .NUM_MOD(5), .MODULI(MA), .W(5)) dut_a (
    .clk, .rst_n, .in_valid(va), .x(xa), .out_valid(oa_valid), .out_res(ra));
  rns_bin2rns #(.B(14), .NUM_MOD(6), .MODULI(MB), .W(6)) dut_b (
    .clk, .rst_n, .in_valid(vb), .x(xb), .out_valid(ob_valid), .out_res(rb));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  int qa_c [$], qa_x [$], qb_c [$], qb_x [$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && oa_valid) begin
      int c, x;
      checks++;
      c = qa_c.pop_front(); x = qa_x.pop_front();
      if (c != cycle) begin
        failures++;
        $display("8-bit: latency wrong for %0d", x);
      end
      for (int j = 0; j < 5; j++)
        if (longint'(ra[j]) != smod(x, MA[j])) begin
          failures++;
          $display("8-bit: x=%0d mod %0d gave %0d", x, MA[j], ra[j]);
        end
    end
    if (rst_n && ob_valid) begin
      int c, x;
      checks++;
      c = qb_c.pop_front(); x = qb_x.pop_front();
      if (c != cycle) begin
        failures++;
        $display("14-bit: latency wrong for %0d", x);
      end
      for (int j = 0; j < 6; j++)
        if (longint'(rb[j]) != smod(x, MB[j])) begin
          failures++;
          $display("14-bit: x=%0d mod %0d gave %0d", x, MB[j], rb[j]);
        end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      va = (i < 256);
      xa = 8'(i - 128);
      if (va) begin
        qa_c.push_back(cycle + 3);
        qa_x.push_back(i - 128);
      end
      vb = ($urandom_range(0, 4) != 0);
      xb = (i < 2) ? 14'(i == 0 ? -8192 : 8191) : 14'($urandom);
      if (vb) begin
        qb_c.push_back(cycle + 3);
        qb_x.push_back(int'($signed(xb)));
      end
    end
    @(negedge clk);
    va = 0; vb = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (qa_c.size() != 0 || qb_c.size() != 0) begin
      failures++;
      $display("results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
