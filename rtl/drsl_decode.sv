// drsl_decode: decoded responder select lines.
//
// The y responder select lines (one-hot, one per page, from the priority
// encoder result) are combined with the r page-offset address bits into
// y * 2^r decoded responder select lines, one per memory column. Column
// p * 2^r + k is selected when responder line p is high and the offset is
// k; offset 0 is the page's CAM column, the others its target-RAM words.
//
// Combinational. Taken from the published design: the combination of responder lines
// with r address bits into DRSLs. The placement of the CAM column at
// offset 0 of each page follows the drawing of the array, where the CAM
// column is the first of its group.
module drsl_decode #(
  parameter int unsigned Y = 128,
  parameter int unsigned R = 3
) (
  input  logic [Y-1:0]          rsl,
  input  logic [R-1:0]          off,
  output logic [(Y<<R)-1:0]     drsl
);

  logic [(1<<R)-1:0] off_dec;

  always_comb begin
    off_dec = '0;
    off_dec[off] = 1'b1;
    for (int p = 0; p < int'(Y); p++)
      drsl[p*(1<<R) +: (1<<R)] = rsl[p] ? off_dec : '0;
  end

endmodule
