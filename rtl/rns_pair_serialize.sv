// rns_pair_serialize: turns the (even, odd) sample pairs of a synthesis
// octave back into one residue stream, the inverse of rns_even_odd_split.
//
// A synthesis octave delivers two samples of the finer approximation
// sequence per step, y_(2n) and y_(2n+1). When the next, finer synthesis
// octave is chained behind it, that octave takes one approximation sample per
// step, so the pair is sent on in two consecutive cycles: y_(2n) the cycle
// after in_valid, y_(2n+1) the cycle after that, each with out_valid high.
// The odd sample waits in a holding register meanwhile.
//
// Rate rule: in_valid may not be high in two consecutive cycles (a pair
// takes two cycles to leave). This holds whenever the octave in front is fed
// at most one pair every second clock, which the analysis side gives, since
// each octave halves the rate. An assertion checks the rule. The chaining of
// synthesis octaves, and with it this block, is this design's own; the
// architecture shows one synthesis octave and states that the signal is
// rebuilt by iterating it.
module rns_pair_serialize #(
  parameter int unsigned NUM_MOD = 5,
  parameter int unsigned W       = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_even [NUM_MOD],
  input  logic [W-1:0] in_odd  [NUM_MOD],
  output logic         out_valid,
  output logic [W-1:0] out_res [NUM_MOD]
);
  logic         odd_pending;           // held odd sample leaves next cycle
  logic [W-1:0] held [NUM_MOD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_pending <= 1'b0;
      out_valid   <= 1'b0;
      for (int j = 0; j < int'(NUM_MOD); j++) begin
        held[j]    <= '0;
        out_res[j] <= '0;
      end
    end else begin
      out_valid   <= in_valid || odd_pending;
      odd_pending <= in_valid;
      for (int j = 0; j < int'(NUM_MOD); j++) begin
        if (in_valid) begin
          out_res[j] <= in_even[j];
          held[j]    <= in_odd[j];
        end else if (odd_pending) begin
          out_res[j] <= held[j];
        end
      end
    end
  end

  a_pair_rate: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |=> !in_valid);
endmodule
