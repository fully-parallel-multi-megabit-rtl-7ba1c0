// class_ctrl: control circuitry and class processing.
//
// Executes each operation held in the CAM/RAM pipeline stage as one or
// more single-cycle steps:
//
//   SEARCH  Step k searches class (base + k) mod C, where base is the class
//           the PRAM gave for the key. On a hit the step ends the search
//           and the matching class and page become the responder. On a
//           miss the search goes on while k < count[base], the number of
//           adjacent classes that base has overflowed into; after the last
//           one it is a true miss. A search with o overflows takes o + 1
//           cycles.
//   INSERT  Places a new key. The first step goes straight to class
//           (base + count[base]); if that class has no free CAM column the
//           next adjacent class is tried, up to count 3 (the 2-bit count
//           allows three overflows). The key is written into the
//           lowest-numbered free column found by the priority encoder,
//           count[base] is raised to the class offset used, and the new
//           entry becomes the responder. If all four classes are full the
//           insert fails and nothing is written.
//   READ    One cycle: reads word off of the responder's page.
//   WRITE   One cycle: writes word off of the responder's page (off = 0
//           rewrites the key). Ignored when there is no valid responder.
//
// In TEST mode READ and WRITE address the array directly by class, page
// and offset, so each class row can be used as a plain RAM.
//
// Timing: the applied class, array controls and x_done are combinational
// from the stage contents and this cycle's search result. At the rising
// edge a finishing step loads the response registers (rsp_*); an
// unfinished one advances the step counter, which is what lets the next
// step's class reach the array early in the following cycle.
//
// Taken from the published design: the 2-bit count per class, up to three adjacent
// overflows, redirection of writes to full classes by the count, searches
// of the counted classes in consecutive cycles, and READ/WRITE through the
// responder of the previous search. This design's choices: the INSERT
// opcode, writing each new key to the lowest free column, the failure of
// an insert after three overflows, ignoring READ/WRITE with no responder,
// and the response fields.
module class_ctrl
  import cam_pkg::*;
#(
  parameter int unsigned B = 32,
  parameter int unsigned C = 32,
  parameter int unsigned Y = 128,
  parameter int unsigned R = 3,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned YW = (Y > 1) ? $clog2(Y) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_mode,
  // operation in the CAM/RAM stage
  input  logic          x_valid,
  input  op_e           x_op,
  input  logic [R-1:0]  x_off,
  input  logic [CW-1:0] x_base,
  input  logic [CW-1:0] x_tcls,
  input  logic [YW-1:0] x_tpage,
  output logic          x_done,
  // to the array
  output logic [CW-1:0] app_cls,
  output logic          search_en,
  output logic          pe_sel_free,
  output logic [Y-1:0]  rsl,
  output logic [R-1:0]  off,
  output logic          we,
  output logic          set_valid,
  // from the priority encoder and the array
  input  logic          pe_hit,
  input  logic [Y-1:0]  pe_onehot,
  input  logic [YW-1:0] pe_addr,
  input  logic [B-1:0]  q,
  // response, registered
  output logic          rsp_valid,
  output op_e           rsp_op,
  output logic          rsp_hit,
  output logic [B-1:0]  rsp_data,
  output logic [CW-1:0] rsp_cls,
  output logic [YW-1:0] rsp_page,
  output logic [CW-1:0] rsp_base,
  output logic [1:0]    rsp_ovf
);

  logic [1:0]    cnt_q [C];     // overflow count per class
  logic          iter_q;        // a multi-cycle operation is under way
  logic [1:0]    step_q;        // class offset of the next step
  logic          resp_valid_q;  // responder registers
  logic [CW-1:0] resp_cls_q;
  logic [Y-1:0]  resp_rsl_q;
  logic [YW-1:0] resp_page_q;

  logic [1:0]    base_cnt;
  logic [1:0]    step;
  logic          is_search, is_insert, is_read, is_write, is_rw;
  logic          access_ok;
  logic          step_done;

  always_comb begin
    is_search = x_op == OP_SEARCH;
    is_insert = x_op == OP_INSERT;
    is_read   = x_op == OP_READ;
    is_write  = x_op == OP_WRITE;
    is_rw     = is_read | is_write;
    access_ok = test_mode | resp_valid_q;
    base_cnt  = cnt_q[x_base];
    step      = iter_q ? step_q : (is_insert ? base_cnt : 2'd0);

    // class processing
    if (is_rw) app_cls = test_mode ? x_tcls : resp_cls_q;
    else       app_cls = x_base + CW'(step);

    off         = is_insert ? '0 : x_off;
    search_en   = x_valid & is_search;
    pe_sel_free = is_insert;
  end

  // Controls that depend on this cycle's priority encoder result.
  always_comb begin
    rsl = '0;
    if (is_insert)               rsl = pe_onehot;
    else if (is_rw && test_mode) rsl[x_tpage] = 1'b1;
    else if (is_rw)              rsl = resp_rsl_q;

    set_valid   = x_valid & is_insert & pe_hit;
    we          = x_valid & ((is_insert & pe_hit) | (is_write & access_ok));

    if (is_search)      step_done = pe_hit | (step >= base_cnt);
    else if (is_insert) step_done = pe_hit | (step == 2'(MAX_OVF));
    else                step_done = 1'b1;
    x_done = x_valid & step_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(C); c++) cnt_q[c] <= '0;
      iter_q       <= 1'b0;
      step_q       <= '0;
      resp_valid_q <= 1'b0;
      resp_cls_q   <= '0;
      resp_rsl_q   <= '0;
      resp_page_q  <= '0;
      rsp_valid    <= 1'b0;
      rsp_op       <= OP_NOP;
      rsp_hit      <= 1'b0;
      rsp_data     <= '0;
      rsp_cls      <= '0;
      rsp_page     <= '0;
      rsp_base     <= '0;
      rsp_ovf      <= '0;
    end else begin
      rsp_valid <= x_done;
      if (x_valid && !step_done) begin
        iter_q <= 1'b1;
        step_q <= step + 2'd1;
      end
      if (x_done) begin
        iter_q   <= 1'b0;
        rsp_op   <= x_op;
        rsp_base <= x_base;
        rsp_ovf  <= step;
        rsp_cls  <= app_cls;
        rsp_data <= is_read ? q : '0;
        if (is_search || is_insert) begin
          rsp_hit      <= pe_hit;
          rsp_page     <= pe_addr;
          resp_valid_q <= pe_hit;
          if (pe_hit) begin
            resp_cls_q  <= app_cls;
            resp_rsl_q  <= pe_onehot;
            resp_page_q <= pe_addr;
          end
          if (is_insert && pe_hit) cnt_q[x_base] <= step;
        end else begin
          rsp_hit  <= is_rw & access_ok;
          rsp_page <= (is_rw && test_mode) ? x_tpage : resp_page_q;
        end
      end
    end
  end

  // The resolver must never select more than one responder.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pe_onehot));

endmodule
