// bit_subarray: the sub-array of one I/O bit.
//
// C rows (one per class) of y * 2^r cells. The class selects one row,
// which is sensed across all columns at once, as the shared word line of
// a row would do. Every 2^r-th column (offset 0 of each page) is a CAM
// column: during a SEARCH its sensed bit is compared with this sub-array's
// reference bit in ml_compare, giving one match-line pull-down per page.
// For READ and WRITE, the one-hot decoded responder select lines (drsl)
// pick a single column of the row: its cell drives q, or takes wbit at the
// clock edge when we is high.
//
// Timing: search pull-downs and q are combinational from cls, ref_bit and
// drsl; a write takes effect at the rising clock edge. The cells have no
// reset, as in a RAM.
//
// Taken from the published design: one sub-array per I/O bit, C rows, class-selected row
// read in every sub-array at once, per-CAM-column comparison and DRSL
// column access. The cells are modelled as flip-flops.
module bit_subarray #(
  parameter int unsigned C = 32,
  parameter int unsigned Y = 128,
  parameter int unsigned R = 3,
  localparam int unsigned COLS = Y << R,
  localparam int unsigned CW   = (C > 1) ? $clog2(C) : 1
) (
  input  logic            clk,
  input  logic [CW-1:0]   cls,
  input  logic            search_en,
  input  logic            ref_bit,
  output logic [Y-1:0]    pd,
  input  logic [COLS-1:0] drsl,
  output logic            q,
  input  logic            we,
  input  logic            wbit
);

  logic [COLS-1:0] row_q [C];
  logic [COLS-1:0] sensed;
  logic [Y-1:0]    sao;

  always_comb begin
    sensed = row_q[cls];
    for (int p = 0; p < int'(Y); p++) sao[p] = sensed[p << R];
  end

  assign q = |(sensed & drsl);

  ml_compare #(.Y(Y)) u_cmp (
    .search_en (search_en),
    .ref_bit   (ref_bit),
    .sao       (sao),
    .pd        (pd)
  );

  always_ff @(posedge clk)
    if (we) row_q[cls] <= (row_q[cls] & ~drsl) | (drsl & {COLS{wbit}});

endmodule
