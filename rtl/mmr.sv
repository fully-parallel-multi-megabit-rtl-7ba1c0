// mmr: hierarchical multiple-match resolver.
//
// Selects the lowest-numbered active match line out of N, in the manner of
// a carry-look-ahead adder rather than a bit-by-bit ripple. The inputs are
// split into N/LEAF lowest-level mmr_section blocks. Above them, each level
// groups FAN blocks of the level below, up to a single top group. Group
// hits are formed bottom-up (a group's hit is the OR of its members'
// hits); inhibits are formed top-down: member k of a group is inhibited
// when the group is inhibited or any member before k has a hit. The top
// group's inhibit is the module input inh. N must be LEAF * FAN^k.
//
// Combinational; the longest path grows with the number of levels, not
// with N. Taken from the published design: the hierarchy and the inhibit/hit connection
// of four 4-input sections into a 16-input resolver, and the 128-input
// resolver as an 8-input lowest level under two 4-way levels (the default
// here). Active-high signals are this design's choice.
module mmr #(
  parameter int unsigned N    = 128,
  parameter int unsigned LEAF = 8,
  parameter int unsigned FAN  = 4
) (
  input  logic         inh,
  input  logic [N-1:0] ml,
  output logic [N-1:0] out,
  output logic         hit
);

  localparam int unsigned NS = N / LEAF;  // lowest-level sections

  // number of levels above the sections
  function automatic int unsigned levels_above();
    int unsigned n, l;
    n = NS;
    l = 0;
    while (n > 1) begin
      n = n / FAN;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LV = levels_above();

  if (NS * LEAF != N || FAN < 2 || FAN ** LV != NS) begin : g_bad
    $error("mmr: N=%0d is not LEAF*FAN^k (LEAF=%0d, FAN=%0d)", N, LEAF, FAN);
  end

  logic [NS-1:0] sec_hit;
  logic [NS-1:0] sec_inh;

  for (genvar s = 0; s < int'(NS); s++) begin : g_sec
    mmr_section #(.N(LEAF)) u_sec (
      .inh (sec_inh[s]),
      .ml  (ml[s*LEAF +: LEAF]),
      .out (out[s*LEAF +: LEAF]),
      .hit (sec_hit[s])
    );
  end

  // Look-ahead tree: gh[l][g] is the hit of group g at level l (level 0 =
  // sections), gi[l][g] its inhibit.
  always_comb begin
    logic [NS-1:0] gh [LV+1];
    logic [NS-1:0] gi [LV+1];
    logic          run;
    for (int l = 0; l <= int'(LV); l++) begin
      gh[l] = '0;
      gi[l] = '0;
    end
    gh[0] = sec_hit;
    for (int l = 1; l <= int'(LV); l++)
      for (int g = 0; g < int'(NS / FAN ** l); g++)
        gh[l][g] = |gh[l-1][g*FAN +: FAN];
    gi[LV][0] = inh;
    for (int l = int'(LV); l >= 1; l--)
      for (int g = 0; g < int'(NS / FAN ** l); g++) begin
        run = gi[l][g];
        for (int k = 0; k < int'(FAN); k++) begin
          gi[l-1][g*FAN + k] = run;
          run = run | gh[l-1][g*FAN + k];
        end
      end
    sec_inh = gi[0];
    hit     = gh[LV][0];
  end

endmodule
