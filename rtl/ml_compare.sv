// ml_compare: XOR comparators and match-line pull-downs of one sub-array.
//
// Each of the y CAM columns of a sub-array has a 1-bit comparator between
// the sensed cell (sao) and the reference bit line of this sub-array. On a
// mismatch during a SEARCH the column's pull-down is turned on and
// discharges that column's match line, which is shared by all b
// sub-arrays. pd[i] high means "pull match line i low".
//
// Combinational. The published circuit is a dynamic differential XOR
// driving a BiCMOS pull-down, with two buffer stages to limit the load on
// ref/refn; that is circuit detail with no effect on the logic and is not
// modelled. The search enable stands in for the evaluate clock (ckx).
module ml_compare #(
  parameter int unsigned Y = 128
) (
  input  logic         search_en,
  input  logic         ref_bit,
  input  logic [Y-1:0] sao,
  output logic [Y-1:0] pd
);

  always_comb pd = search_en ? (sao ^ {Y{ref_bit}}) : '0;

endmodule
