// rns_rns2bin: scaled RNS-to-binary converter (epsilon-CRT).
//
// Turns the residues X_j of a number X in the signed dynamic range
// [-M/2, M/2) into the OUT_W-bit two's complement value X * 2^OUT_W / M, i.e.
// X scaled so that the dynamic range fills the output word. By the Chinese
// Remainder Theorem X/M = frac( sum_j |X_j Mj^-1|_mj / mj ) with Mj = M/mj,
// so each channel needs one 2^W x OUT_W table holding
// round(|X_j Mj^-1|_mj * 2^OUT_W / mj) and the tables' outputs are added
// modulo 2^OUT_W by a plain binary adder tree: no modular reduction by M is
// needed. Each table rounds, so the result is within NUM_MOD/2 units of the
// last place of the exact scaled value. Tables are filled at elaboration from
// rns_pkg::crt_entry.
//
// Timing: the table outputs are registered at the edge that takes in_res
// (in_valid high), then each level of the adder tree has its own register:
// out_valid follows in_valid by 1 + ceil(log2 NUM_MOD) clocks (4 for five
// moduli), one conversion per clock. The pipelining is this design's choice.
module rns_rns2bin #(
  parameter int unsigned NUM_MOD = rns_pkg::DEF_NUM_MOD,
  parameter int unsigned MODULI [NUM_MOD] = rns_pkg::DEF_MODULI,
  parameter int unsigned W       = 5,
  parameter int unsigned OUT_W   = rns_pkg::DEF_OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     in_res [NUM_MOD],
  output logic             out_valid,
  output logic [OUT_W-1:0] out_bin
);
  localparam int unsigned LEVELS = (NUM_MOD <= 1) ? 0 : $clog2(NUM_MOD);
  localparam int unsigned P      = 1 << LEVELS;

  // product of all moduli except number j
  function automatic longint unsigned prod_except(input int unsigned j);
    longint unsigned p;
    p = 1;
    for (int unsigned i = 0; i < NUM_MOD; i++)
      if (i != j) p = p * MODULI[i];
    return p;
  endfunction

  // lvl[0] holds the registered table outputs, lvl[v] the partial sums of
  // tree level v; entries beyond the used ones stay zero
  logic [OUT_W-1:0] lvl [LEVELS+1][P];
  logic [LEVELS:0]  vld;

  for (genvar j = 0; j < P; j++) begin : g_mod
    if (j < NUM_MOD) begin : g_lut
      localparam int unsigned      MJ   = MODULI[j];
      localparam longint unsigned  BIGM = prod_except(j);
      logic [OUT_W-1:0] rom [2**W];
      for (genvar a = 0; a < 2**W; a++) begin : g_rom
        localparam logic [OUT_W-1:0] ENTRY = OUT_W'(rns_pkg::crt_entry(MJ, BIGM, a, OUT_W));
        assign rom[a] = ENTRY;
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)        lvl[0][j] <= '0;
        else if (in_valid) lvl[0][j] <= rom[in_res[j]];
      end
    end else begin : g_pad
      assign lvl[0][j] = '0;
    end
  end

  for (genvar v = 1; v <= LEVELS; v++) begin : g_lvl
    for (genvar i = 0; i < P; i++) begin : g_node
      if (i < (P >> v)) begin : g_add
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)          lvl[v][i] <= '0;
          else if (vld[v-1])   lvl[v][i] <= lvl[v-1][2*i] + lvl[v-1][2*i+1];
        end
      end else begin : g_unused
        assign lvl[v][i] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LEVELS-1:0], in_valid};
  end

  assign out_valid = vld[LEVELS];
  assign out_bin   = lvl[LEVELS][0];
endmodule
