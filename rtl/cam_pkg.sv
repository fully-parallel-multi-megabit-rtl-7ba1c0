// cam_pkg: shared types and default sizes of the pre-classified CAM/RAM.
//
// The default sizes are the 1 Mb configuration: b = 32 I/O bits (one
// sub-array per bit), C = 32 classes, y = 128 CAM columns (pages) per
// sub-array row and r = 3 page-offset bits, so each page holds 2^r = 8
// words (the CAM key word plus seven target-RAM words) and the array is
// (y * 2^r) x (C * b) = 1024 x 1024 cells. The 128-input multiple-match
// resolver uses 8-input lowest-level sections and two levels of 4-way
// grouping. The 64-entry pre-classification RAM indexed by the six data
// LSBs is the test chip's figure; using it unchanged for the 1 Mb
// configuration is this design's choice.
//
// The operation set follows the published SEARCH, READ and WRITE. The
// published design also speaks of WRITE requests "to a class" that are redirected
// when the class is full; that placement of a new key is a separate
// opcode here, OP_INSERT.
package cam_pkg;

  localparam int unsigned B_DEF        = 32;  // b: word width, one sub-array per bit
  localparam int unsigned C_DEF        = 32;  // C: classes (rows per sub-array)
  localparam int unsigned Y_DEF        = 128; // y: CAM columns (pages) per row
  localparam int unsigned R_DEF        = 3;   // r: page offset bits
  localparam int unsigned PRAM_AW_DEF  = 6;   // PRAM address bits (data LSBs)
  localparam int unsigned MMR_LEAF_DEF = 8;   // inputs of a lowest-level MMR section
  localparam int unsigned MMR_FAN_DEF  = 4;   // sections per higher MMR level
  localparam int unsigned MAX_OVF      = 3;   // 2-bit overflow count per class

  typedef enum logic [2:0] {
    OP_NOP    = 3'd0,
    OP_SEARCH = 3'd1,  // look the key up in its class and its overflow classes
    OP_READ   = 3'd2,  // read word r of the page found by the last SEARCH/INSERT
    OP_WRITE  = 3'd3,  // write word r of that page (r = 0 is the CAM key itself)
    OP_INSERT = 3'd4   // place a new key in a free CAM column of its class
  } op_e;

endpackage
