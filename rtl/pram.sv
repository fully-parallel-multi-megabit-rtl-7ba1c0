// pram: pre-classification RAM.
//
// Maps the PRAM_AW low bits of a data word to a class number. The table is
// read one cycle ahead of the CAM/RAM: the read is synchronous, and its
// output register is the first class pipeline register, loaded only when
// rd_en is high so that it holds while the CAM/RAM stalls. A separate write
// port lets the table be rewritten during operation to even out the spread
// of data over the classes.
//
// Timing: rd_class is valid the cycle after rd_en. A write and a read of
// the same entry in one cycle return the old contents.
//
// Taken from the published design: the table's role, its 64 entries addressed by the six
// data LSBs (test chip: 64 x 4 for 16 classes), its rewriting during
// operation and its read one cycle before the CAM/RAM. This design's
// choices: the separate write port and the absence of reset (the table
// must be written before use).
module pram #(
  parameter int unsigned AW = 6,
  parameter int unsigned CW = 5
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [CW-1:0] rd_class,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [CW-1:0] wr_class
);

  logic [CW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (rd_en) rd_class <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_class;
  end

endmodule
