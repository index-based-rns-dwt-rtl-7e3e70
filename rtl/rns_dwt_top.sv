// rns_dwt_top: residue number system (RNS) discrete wavelet transform filter
// bank with index-transform multipliers, analysis and synthesis side by side.
//
// Analysis path: a B_IN-bit two's complement sample stream x (one sample per
// clock at most) is converted to NUM_MOD residues (rns_bin2rns), split into
// even and odd sequences (rns_even_odd_split) and filtered by NUM_MOD
// independent modulo-m_j channels (rns_dwt_channel), one per modulus. Each
// octave yields a detail sequence d and an approximation sequence a at half
// its input rate; with OCTAVES > 1 the approximation residues feed the next
// octave directly, staying in the RNS. Every detail sequence and the last
// approximation sequence leave both as residues (exact, modulo M = prod m_j)
// and as OUT_W-bit binary words scaled by 2^OUT_W / M (rns_rns2bin).
//
// Synthesis path: SYN_OCTAVES chained octaves of the inverse transform. The
// coarsest one takes an approximation and a detail residue pair per step
// (syn_valid, syn_a_res, syn_d_res[0], typically the last analysis outputs)
// and NUM_MOD rns_idwt_channel instances rebuild two samples of the finer
// approximation sequence. With SYN_OCTAVES > 1, rns_pair_serialize sends
// those two samples on one per cycle as the approximation input of the next,
// finer octave s, which pairs each with a detail sample read from
// syn_d_res[s] in the cycle syn_d_take[s] is high (the detail sequence of
// that octave, in order, supplied by the user; syn_d_take[0] is syn_valid).
// The finest octave's even and odd samples leave as residues and as scaled
// binary words. With SYN_OCTAVES > 1, syn_valid may not be high in two
// consecutive cycles. The chaining is this design's own; the architecture
// shows one synthesis octave, rebuilt by iteration.
//
// Coefficients are run-time inputs in the index domain, per channel and tap:
// *_idx[j][k] = Phi_j(c_k mod m_j) using the primitive root
// rns_pkg::prim_root(m_j), and *_zero[j][k] set where c_k mod m_j = 0. The
// same analysis filters serve every octave.
//
// Default configuration: 8 taps, 8-bit input, moduli {31, 29, 23, 19, 17}
// (about 22.7 bits of dynamic range, enough for a 21-bit result of 10-bit
// coefficients), 16-bit scaled binary outputs, one octave. The octave
// cascade, the even/odd splitting, the valid signalling and the pipeline
// registers outside the channels are this design's choices.
//
// Latency (analysis, one octave): x sample 2n+1 taken -> 2 clocks in the
// converter -> 1 clock to form the pair -> 2 clocks in the channel, so
// a_valid/d_valid rise 5 clocks after the odd sample; the binary outputs
// follow 1 + ceil(log2 NUM_MOD) clocks later. Synthesis: each octave takes
// 2 clocks and each serialiser 1 (2 for the odd sample), so with one
// synthesis octave rec_valid rises 2 clocks after syn_valid.
module rns_dwt_top #(
  parameter int unsigned B_IN    = rns_pkg::DEF_B_IN,
  parameter int unsigned N_TAPS  = rns_pkg::DEF_N_TAPS,
  parameter int unsigned NUM_MOD = rns_pkg::DEF_NUM_MOD,
  parameter int unsigned MODULI [NUM_MOD] = rns_pkg::DEF_MODULI,
  parameter int unsigned W       = 5,     // residue width, ceil(log2 max m_j)
  parameter int unsigned OUT_W   = rns_pkg::DEF_OUT_W,
  parameter int unsigned OCTAVES = 1,
  parameter int unsigned SYN_OCTAVES = 1
) (
  input  logic              clk,
  input  logic              rst_n,

  // analysis input
  input  logic              x_valid,
  input  logic [B_IN-1:0]   x,

  // analysis coefficients (index domain)
  input  logic [W-1:0]      ana_g_idx  [NUM_MOD][N_TAPS],
  input  logic [N_TAPS-1:0] ana_g_zero [NUM_MOD],
  input  logic [W-1:0]      ana_h_idx  [NUM_MOD][N_TAPS],
  input  logic [N_TAPS-1:0] ana_h_zero [NUM_MOD],

  // analysis outputs: detail of every octave, approximation of the last
  output logic [OCTAVES-1:0] d_valid,
  output logic [W-1:0]       d_res [OCTAVES][NUM_MOD],
  output logic [OCTAVES-1:0] d_bin_valid,
  output logic [OUT_W-1:0]   d_bin [OCTAVES],
  output logic               a_valid,
  output logic [W-1:0]       a_res [NUM_MOD],
  output logic               a_bin_valid,
  output logic [OUT_W-1:0]   a_bin,

  // synthesis input and coefficients
  input  logic              syn_valid,
  input  logic [W-1:0]      syn_a_res  [NUM_MOD],
  input  logic [W-1:0]      syn_d_res  [SYN_OCTAVES][NUM_MOD],
  output logic [SYN_OCTAVES-1:0] syn_d_take,
  input  logic [W-1:0]      syn_g_idx  [NUM_MOD][N_TAPS],
  input  logic [N_TAPS-1:0] syn_g_zero [NUM_MOD],
  input  logic [W-1:0]      syn_h_idx  [NUM_MOD][N_TAPS],
  input  logic [N_TAPS-1:0] syn_h_zero [NUM_MOD],

  // synthesis outputs
  output logic              rec_valid,
  output logic [W-1:0]      rec_even_res [NUM_MOD],
  output logic [W-1:0]      rec_odd_res  [NUM_MOD],
  output logic              rec_bin_valid,
  output logic [OUT_W-1:0]  rec_even_bin,
  output logic [OUT_W-1:0]  rec_odd_bin
);

  // ---------------------------------------------------------------- analysis
  // stream o is the input of octave o; stream OCTAVES is the last approximation
  logic [OCTAVES:0] s_valid;
  logic [W-1:0]     s_res [OCTAVES+1][NUM_MOD];

  rns_bin2rns #(.B(B_IN), .NUM_MOD(NUM_MOD), .MODULI(MODULI), .W(W)) u_b2r (
    .clk, .rst_n,
    .in_valid(x_valid), .x(x),
    .out_valid(s_valid[0]), .out_res(s_res[0])
  );

  for (genvar o = 0; o < OCTAVES; o++) begin : g_oct
    logic         pair_valid;
    logic [W-1:0] pair_even [NUM_MOD];
    logic [W-1:0] pair_odd  [NUM_MOD];
    logic [NUM_MOD-1:0] ch_valid;

    rns_even_odd_split #(.NUM_MOD(NUM_MOD), .W(W)) u_split (
      .clk, .rst_n,
      .in_valid(s_valid[o]), .in_res(s_res[o]),
      .out_valid(pair_valid), .out_even(pair_even), .out_odd(pair_odd)
    );

    for (genvar j = 0; j < NUM_MOD; j++) begin : g_ch
      rns_dwt_channel #(.M(MODULI[j]), .W(W), .N_TAPS(N_TAPS)) u_ch (
        .clk, .rst_n,
        .in_valid(pair_valid), .in_even(pair_even[j]), .in_odd(pair_odd[j]),
        .g_idx(ana_g_idx[j]), .g_zero(ana_g_zero[j]),
        .h_idx(ana_h_idx[j]), .h_zero(ana_h_zero[j]),
        .out_valid(ch_valid[j]), .out_a(s_res[o+1][j]), .out_d(d_res[o][j])
      );
    end

    // all channels run in lock step; channel 0 speaks for them
    assign s_valid[o+1] = ch_valid[0];
    assign d_valid[o]   = ch_valid[0];

    a_ana_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      ch_valid == {NUM_MOD{ch_valid[0]}});

    rns_rns2bin #(.NUM_MOD(NUM_MOD), .MODULI(MODULI), .W(W), .OUT_W(OUT_W)) u_r2b_d (
      .clk, .rst_n,
      .in_valid(ch_valid[0]), .in_res(d_res[o]),
      .out_valid(d_bin_valid[o]), .out_bin(d_bin[o])
    );
  end

  assign a_valid = s_valid[OCTAVES];
  assign a_res   = s_res[OCTAVES];

  rns_rns2bin #(.NUM_MOD(NUM_MOD), .MODULI(MODULI), .W(W), .OUT_W(OUT_W)) u_r2b_a (
    .clk, .rst_n,
    .in_valid(a_valid), .in_res(a_res),
    .out_valid(a_bin_valid), .out_bin(a_bin)
  );

  // --------------------------------------------------------------- synthesis
  // st_* is the approximation input of synthesis octave s (0 = coarsest)
  logic [SYN_OCTAVES-1:0] st_valid;
  logic [W-1:0]           st_a [SYN_OCTAVES][NUM_MOD];

  assign st_valid[0] = syn_valid;
  assign st_a[0]     = syn_a_res;
  assign syn_d_take  = st_valid;

  for (genvar s = 0; s < SYN_OCTAVES; s++) begin : g_syn_oct
    logic [NUM_MOD-1:0] ch_valid;
    logic [W-1:0]       y_even [NUM_MOD];
    logic [W-1:0]       y_odd  [NUM_MOD];

    for (genvar j = 0; j < NUM_MOD; j++) begin : g_ch
      rns_idwt_channel #(.M(MODULI[j]), .W(W), .N_TAPS(N_TAPS)) u_ch (
        .clk, .rst_n,
        .in_valid(st_valid[s]), .in_a(st_a[s][j]), .in_d(syn_d_res[s][j]),
        .g_idx(syn_g_idx[j]), .g_zero(syn_g_zero[j]),
        .h_idx(syn_h_idx[j]), .h_zero(syn_h_zero[j]),
        .out_valid(ch_valid[j]),
        .out_even(y_even[j]), .out_odd(y_odd[j])
      );
    end

    a_syn_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      ch_valid == {NUM_MOD{ch_valid[0]}});

    if (s + 1 < SYN_OCTAVES) begin : g_chain
      rns_pair_serialize #(.NUM_MOD(NUM_MOD), .W(W)) u_ser (
        .clk, .rst_n,
        .in_valid(ch_valid[0]), .in_even(y_even), .in_odd(y_odd),
        .out_valid(st_valid[s+1]), .out_res(st_a[s+1])
      );
    end else begin : g_last
      assign rec_valid    = ch_valid[0];
      assign rec_even_res = y_even;
      assign rec_odd_res  = y_odd;
    end
  end

  logic rec_odd_bin_valid;

  rns_rns2bin #(.NUM_MOD(NUM_MOD), .MODULI(MODULI), .W(W), .OUT_W(OUT_W)) u_r2b_even (
    .clk, .rst_n,
    .in_valid(rec_valid), .in_res(rec_even_res),
    .out_valid(rec_bin_valid), .out_bin(rec_even_bin)
  );
  rns_rns2bin #(.NUM_MOD(NUM_MOD), .MODULI(MODULI), .W(W), .OUT_W(OUT_W)) u_r2b_odd (
    .clk, .rst_n,
    .in_valid(rec_valid), .in_res(rec_odd_res),
    .out_valid(rec_odd_bin_valid), .out_bin(rec_odd_bin)
  );

  // the two converters of the synthesis outputs run in lock step
  a_rec_bin_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    rec_odd_bin_valid == rec_bin_valid);
endmodule
