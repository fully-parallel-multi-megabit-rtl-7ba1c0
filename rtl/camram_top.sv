// camram_top: fully-parallel pre-classified CAM integrated with its target RAM.
//
// A large CAM normally cannot put several words in one physical row and
// still compare them all at once. Here the data are first sorted into C
// classes by a small pre-classification RAM (PRAM) addressed by the data's
// low bits. Every row of the array belongs to one class, so a SEARCH
// opens a single row in each of the b bit sub-arrays and compares the y
// CAM columns of that row with the reference word in parallel, one
// comparator per column. Each CAM column heads a page of 2^r words; the
// other words of the page are the target RAM, reached through the decoded
// responder select lines formed from the search result and r address bits.
//
// Pipeline (one clock):
//   accept edge  : the PRAM is read with the key's low bits into the first
//                  class register; operation, data and address go to the
//                  data/address pipeline register.
//   CAM/RAM stage: class_ctrl adds the overflow step to the class, the
//                  array is searched or accessed, the priority encoder
//                  resolves the match lines, and at the next edge the
//                  response is registered. A SEARCH that must visit o
//                  overflow classes holds the stage for o + 1 cycles
//                  (req_ready low meanwhile), READ and WRITE take one.
// While the stage works on one operation the PRAM is already read for the
// next, so a SEARCH with o overflows followed by n READs or WRITEs takes
// o + n + 1 cycles. A response appears on rsp_* one cycle after the
// operation's last stage cycle.
//
// Interface: valid/ready request (req_*), a PRAM write port (pram_*) that
// can be used at any time, test_mode for direct class/page/offset access,
// and a registered one-cycle response (rsp_*). rsp_hit is the search or
// insert result, or for READ/WRITE whether the access was made.
//
// Taken from the published design: all sizes (defaults are the 1 Mb configuration), the
// PRAM-before-CAM/RAM pipeline and its registers, the overflow scheme and
// its cycle counts, and TEST mode. This design's choices: a single clock
// in place of the published design's separate PRAM, CAM/RAM and match clocks, the
// valid/ready handshake, the INSERT opcode and the entry-valid plane.
module camram_top
  import cam_pkg::*;
#(
  parameter int unsigned B        = B_DEF,
  parameter int unsigned C        = C_DEF,
  parameter int unsigned Y        = Y_DEF,
  parameter int unsigned R        = R_DEF,
  parameter int unsigned PRAM_AW  = PRAM_AW_DEF,
  parameter int unsigned MMR_LEAF = MMR_LEAF_DEF,
  parameter int unsigned MMR_FAN  = MMR_FAN_DEF,
  localparam int unsigned CW   = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned YW   = (Y > 1) ? $clog2(Y) : 1,
  localparam int unsigned COLS = Y << R
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               test_mode,
  // request
  input  logic               req_valid,
  output logic               req_ready,
  input  op_e                req_op,
  input  logic [B-1:0]       req_data,
  input  logic [R-1:0]       req_off,
  input  logic [CW-1:0]      req_tcls,
  input  logic [YW-1:0]      req_tpage,
  // PRAM rewrite
  input  logic               pram_we,
  input  logic [PRAM_AW-1:0] pram_waddr,
  input  logic [CW-1:0]      pram_wclass,
  // response
  output logic               rsp_valid,
  output op_e                rsp_op,
  output logic               rsp_hit,
  output logic [B-1:0]       rsp_data,
  output logic [CW-1:0]      rsp_cls,
  output logic [YW-1:0]      rsp_page,
  output logic [CW-1:0]      rsp_base,
  output logic [1:0]         rsp_ovf
);

  if (B < PRAM_AW) begin : g_bad_aw
    $error("camram_top: PRAM_AW=%0d exceeds the word width B=%0d", PRAM_AW, B);
  end

  // data/address pipeline register (CAM/RAM stage)
  logic          x_valid;
  op_e           x_op;
  logic [B-1:0]  x_data;
  logic [R-1:0]  x_off;
  logic [CW-1:0] x_tcls;
  logic [YW-1:0] x_tpage;
  logic [CW-1:0] x_base;   // first class register: the PRAM output
  logic          x_done;
  logic          accept;

  assign req_ready = !x_valid || x_done;
  assign accept    = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x_op    <= OP_NOP;
      x_data  <= '0;
      x_off   <= '0;
      x_tcls  <= '0;
      x_tpage <= '0;
    end else if (accept) begin
      x_valid <= 1'b1;
      x_op    <= req_op;
      x_data  <= req_data;
      x_off   <= req_off;
      x_tcls  <= req_tcls;
      x_tpage <= req_tpage;
    end else if (x_done) begin
      x_valid <= 1'b0;
    end
  end

  pram #(.AW(PRAM_AW), .CW(CW)) u_pram (
    .clk      (clk),
    .rd_en    (accept),
    .rd_addr  (req_data[PRAM_AW-1:0]),
    .rd_class (x_base),
    .wr_en    (pram_we),
    .wr_addr  (pram_waddr),
    .wr_class (pram_wclass)
  );

  // control and class processing
  logic [CW-1:0]   app_cls;
  logic            search_en, pe_sel_free, we, set_valid;
  logic [Y-1:0]    rsl;
  logic [R-1:0]    off;
  logic            pe_hit;
  logic [Y-1:0]    pe_onehot, pe_in, ml, valid_row;
  logic [YW-1:0]   pe_addr;
  logic [B-1:0]    q;
  logic [COLS-1:0] drsl;

  class_ctrl #(.B(B), .C(C), .Y(Y), .R(R)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .test_mode   (test_mode),
    .x_valid     (x_valid),
    .x_op        (x_op),
    .x_off       (x_off),
    .x_base      (x_base),
    .x_tcls      (x_tcls),
    .x_tpage     (x_tpage),
    .x_done      (x_done),
    .app_cls     (app_cls),
    .search_en   (search_en),
    .pe_sel_free (pe_sel_free),
    .rsl         (rsl),
    .off         (off),
    .we          (we),
    .set_valid   (set_valid),
    .pe_hit      (pe_hit),
    .pe_onehot   (pe_onehot),
    .pe_addr     (pe_addr),
    .q           (q),
    .rsp_valid   (rsp_valid),
    .rsp_op      (rsp_op),
    .rsp_hit     (rsp_hit),
    .rsp_data    (rsp_data),
    .rsp_cls     (rsp_cls),
    .rsp_page    (rsp_page),
    .rsp_base    (rsp_base),
    .rsp_ovf     (rsp_ovf)
  );

  drsl_decode #(.Y(Y), .R(R)) u_drsl (
    .rsl  (rsl),
    .off  (off),
    .drsl (drsl)
  );

  camram_array #(.B(B), .C(C), .Y(Y), .R(R)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .cls       (app_cls),
    .search_en (search_en),
    .ref_data  (x_data),
    .ml        (ml),
    .valid_row (valid_row),
    .drsl      (drsl),
    .q         (q),
    .we        (we),
    .wdata     (x_data),
    .set_valid (set_valid),
    .rsl       (rsl)
  );

  // SEARCH resolves the match lines; INSERT resolves the free columns.
  assign pe_in = pe_sel_free ? ~valid_row : ml;

  prio_enc #(.N(Y), .LEAF(MMR_LEAF), .FAN(MMR_FAN)) u_pe (
    .ml     (pe_in),
    .onehot (pe_onehot),
    .addr   (pe_addr),
    .hit    (pe_hit)
  );

  // Handshake rules: a request that is not accepted is held unchanged, and
  // TEST mode does not change under an operation in the stage.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_op) && $stable(req_data)
                                && $stable(req_off));
  a_test_stable : assert property (@(posedge clk) disable iff (!rst_n)
    x_valid |-> $stable(test_mode));

endmodule
