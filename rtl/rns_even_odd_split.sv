// rns_even_odd_split: decomposes a residue stream into its even and odd
// sequences for the polyphase filters.
//
// Samples arrive one per cycle with in_valid high, for all NUM_MOD channels
// at once. The first sample after reset is number 0 (even). An even sample is
// held; when the following odd sample arrives, the pair (x_(2n), x_(2n+1)) is
// registered onto out_even/out_odd and out_valid is high for one cycle, the
// cycle after the odd sample was taken. The filter bank processes one pair
// per step, so a stream of one sample per clock becomes one pair every other
// clock. Gaps in in_valid are allowed anywhere. How the two sequences are
// formed is this design's choice; the architecture shows them only as the
// two branches of the input.
module rns_even_odd_split #(
  parameter int unsigned NUM_MOD = 5,
  parameter int unsigned W       = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_res   [NUM_MOD],
  output logic         out_valid,
  output logic [W-1:0] out_even [NUM_MOD],
  output logic [W-1:0] out_odd  [NUM_MOD]
);
  logic         odd_next;              // next sample taken is odd
  logic [W-1:0] held [NUM_MOD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_next  <= 1'b0;
      out_valid <= 1'b0;
      for (int j = 0; j < int'(NUM_MOD); j++) begin
        held[j]     <= '0;
        out_even[j] <= '0;
        out_odd[j]  <= '0;
      end
    end else begin
      out_valid <= in_valid && odd_next;
      if (in_valid) begin
        odd_next <= !odd_next;
        for (int j = 0; j < int'(NUM_MOD); j++) begin
          if (!odd_next) held[j] <= in_res[j];
          else begin
            out_even[j] <= held[j];
            out_odd[j]  <= in_res[j];
          end
        end
      end
    end
  end
endmodule
