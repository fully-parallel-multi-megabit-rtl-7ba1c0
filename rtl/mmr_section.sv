// mmr_section: lowest-level section of the multiple-match resolver.
//
// Of the N match inputs, the lowest-numbered active one wins: out[i] is
// high when ml[i] is high, no ml[j] with j < i is high, and the section is
// not inhibited. hit reports any active input, whether or not the section
// is inhibited, so that a higher level can inhibit the sections after it.
//
// Combinational. The published section is a shared-transistor NAND
// network on inverted match lines with active-low hit and up to 8 inputs;
// this is its logic function with active-high signals.
module mmr_section #(
  parameter int unsigned N = 8
) (
  input  logic         inh,
  input  logic [N-1:0] ml,
  output logic [N-1:0] out,
  output logic         hit
);

  always_comb begin
    logic seen;  // some ml[j], j < i, is active
    seen = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      out[i] = ml[i] & ~seen & ~inh;
      seen   = seen | ml[i];
    end
  end

  // hit ignores inh, so that a higher level can use it to inhibit others
  assign hit = |ml;

endmodule
