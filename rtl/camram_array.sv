// camram_array: the integrated CAM/RAM array.
//
// b bit sub-arrays share the class (row) address, the decoded responder
// select lines and one match line per page. During a SEARCH each
// sub-array compares its CAM columns with its bit of the reference word;
// a match line stays high only when no sub-array pulls it down, so match
// line p reports that the key stored in page p of the selected class
// equals the reference word. For READ and WRITE the selected column of
// every sub-array forms a b-bit word on q / from wdata.
//
// An entry-valid plane (C rows of y bits, cleared by reset) marks which
// CAM columns hold a key. Match lines of empty columns are held low, and
// valid_row shows the free columns of the selected class so that the
// priority encoder can pick one for a new key; set_valid marks the column
// chosen by the one-hot rsl in the selected class.
//
// Timing: ml, valid_row and q are combinational from cls, ref_data and
// drsl; writes and set_valid act at the rising clock edge.
//
// Taken from the published design: the sub-array per bit, the shared
// class rows and the wired match lines. The valid plane is this design's
// own: the published design does not say how empty entries are kept from
// matching or how they are found.
module camram_array #(
  parameter int unsigned B = 32,
  parameter int unsigned C = 32,
  parameter int unsigned Y = 128,
  parameter int unsigned R = 3,
  localparam int unsigned COLS = Y << R,
  localparam int unsigned CW   = (C > 1) ? $clog2(C) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CW-1:0]   cls,
  input  logic            search_en,
  input  logic [B-1:0]    ref_data,
  output logic [Y-1:0]    ml,
  output logic [Y-1:0]    valid_row,
  input  logic [COLS-1:0] drsl,
  output logic [B-1:0]    q,
  input  logic            we,
  input  logic [B-1:0]    wdata,
  input  logic            set_valid,
  input  logic [Y-1:0]    rsl
);

  logic [Y-1:0] pd  [B];
  logic [Y-1:0] vld [C];

  for (genvar i = 0; i < int'(B); i++) begin : g_bit
    bit_subarray #(.C(C), .Y(Y), .R(R)) u_sub (
      .clk       (clk),
      .cls       (cls),
      .search_en (search_en),
      .ref_bit   (ref_data[i]),
      .pd        (pd[i]),
      .drsl      (drsl),
      .q         (q[i]),
      .we        (we),
      .wbit      (wdata[i])
    );
  end

  always_comb begin
    valid_row = vld[cls];
    ml = valid_row & {Y{search_en}};
    for (int i = 0; i < int'(B); i++) ml = ml & ~pd[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(C); c++) vld[c] <= '0;
    end else if (set_valid) begin
      vld[cls] <= vld[cls] | rsl;
    end
  end

endmodule
