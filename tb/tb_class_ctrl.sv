// tb_class_ctrl: directed self-checking test of the control circuitry.
// The testbench plays the array and priority encoder, presenting a hit or
// a miss in each cycle, and checks the class applied each cycle, the
// array controls, the number of cycles per operation and the registered
// response: overflowing inserts that wrap past the last class, searches
// that visit the counted overflow classes, a true miss, READ/WRITE
// through the responder, TEST mode access, and an insert that fails after
// three overflows.
module tb_class_ctrl;
  import cam_pkg::*;
  localparam int unsigned B  = 32;
  localparam int unsigned C  = 32;
  localparam int unsigned Y  = 128;
  localparam int unsigned R  = 3;
  localparam int unsigned CW = 5;
  localparam int unsigned YW = 7;

  logic          clk = 1'b0;
  logic          rst_n, test_mode;
  logic          x_valid;
  op_e           x_op;
  logic [R-1:0]  x_off;
  logic [CW-1:0] x_base, x_tcls;
  logic [YW-1:0] x_tpage;
  logic          x_done;
  logic [CW-1:0] app_cls;
  logic          search_en, pe_sel_free, we, set_valid;
  logic [Y-1:0]  rsl;
  logic [R-1:0]  off;
  logic          pe_hit;
  logic [Y-1:0]  pe_onehot;
  logic [YW-1:0] pe_addr;
  logic [B-1:0]  q;
  logic          rsp_valid, rsp_hit;
  op_e           rsp_op;
  logic [B-1:0]  rsp_data;
  logic [CW-1:0] rsp_cls, rsp_base;
  logic [YW-1:0] rsp_page;
  logic [1:0]    rsp_ovf;
  int            checks = 0, failures = 0;

  class_ctrl #(.B(B), .C(C), .Y(Y), .R(R)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t app_cls=%0d done=%0b we=%0b)", what, $time, app_cls, x_done, we);
    end
  endtask

  // Present one cycle of the stage: operation, and the encoder's answer.
  task automatic cycle(input op_e op, input int base, input int hit_page,
                       input int exp_cls, input bit exp_done, input bit exp_we);
    x_valid = 1'b1; x_op = op; x_base = CW'(base);
    pe_hit = hit_page >= 0;
    pe_onehot = '0;
    if (hit_page >= 0) pe_onehot[hit_page] = 1'b1;
    pe_addr = (hit_page >= 0) ? YW'(hit_page) : '0;
    #1;
    chk(app_cls == CW'(exp_cls), $sformatf("%s applied class %0d, expected %0d", op.name(), app_cls, exp_cls));
    chk(x_done == exp_done, $sformatf("%s done", op.name()));
    chk(we == exp_we, $sformatf("%s write enable", op.name()));
    chk(search_en == (op == OP_SEARCH) && pe_sel_free == (op == OP_INSERT), "search/free select");
    @(negedge clk);
    chk(rsp_valid == exp_done, "response valid");
  endtask

  task automatic idle();
    x_valid = 1'b0;
    #1;
    chk(!x_done && !we && !set_valid, "idle stage does nothing");
    @(negedge clk);
  endtask

  initial begin
    rst_n = 0; test_mode = 0; x_valid = 0; x_op = OP_NOP; x_off = '0; x_base = '0;
    x_tcls = '0; x_tpage = '0; pe_hit = 0; pe_onehot = '0; pe_addr = '0; q = '0;
    #12 rst_n = 1;
    @(negedge clk);
    idle();

    // search with no overflow: one cycle, miss
    cycle(OP_SEARCH, 5, -1, 5, 1, 0);
    chk(rsp_op == OP_SEARCH && !rsp_hit && rsp_ovf == 0 && rsp_base == 5, "plain miss response");

    // insert into a full class 31: overflows wrap to 0, then 1 has room
    cycle(OP_INSERT, 31, -1, 31, 0, 0);
    cycle(OP_INSERT, 31, -1, 0, 0, 0);
    x_valid = 1; x_op = OP_INSERT; pe_hit = 1; pe_onehot = '0; pe_onehot[9] = 1; pe_addr = 9;
    #1;
    chk(set_valid && rsl == pe_onehot && off == '0, "insert writes key at the free column");
    cycle(OP_INSERT, 31, 9, 1, 1, 1);
    chk(rsp_hit && rsp_cls == 1 && rsp_page == 9 && rsp_ovf == 2, "insert response after two overflows");

    // the count sends the next insert straight to class 1
    cycle(OP_INSERT, 31, 3, 1, 1, 1);
    chk(rsp_ovf == 2 && rsp_cls == 1 && rsp_page == 3, "insert directed by the count");

    // search of class 31 must visit 31, 0 and 1 before a true miss
    cycle(OP_SEARCH, 31, -1, 31, 0, 0);
    cycle(OP_SEARCH, 31, -1, 0, 0, 0);
    cycle(OP_SEARCH, 31, -1, 1, 1, 0);
    chk(!rsp_hit && rsp_ovf == 2, "true miss after the counted classes");

    // READ without a responder is ignored
    x_off = 3;
    cycle(OP_READ, 0, -1, 1, 1, 0);
    chk(!rsp_hit, "read without responder refused");
    cycle(OP_WRITE, 0, -1, 1, 1, 0);
    chk(!rsp_hit, "write without responder refused");

    // search hit in the first overflow class
    cycle(OP_SEARCH, 31, -1, 31, 0, 0);
    cycle(OP_SEARCH, 31, 20, 0, 1, 0);
    chk(rsp_hit && rsp_cls == 0 && rsp_page == 20 && rsp_ovf == 1, "hit in overflow class");

    // READ and WRITE go to the responder's page
    x_off = 5; q = 32'hDEADBEEF;
    x_valid = 1; x_op = OP_READ;
    #1;
    chk(rsl == (Y'(1) << 20) && off == 5, "read selects responder page and offset");
    cycle(OP_READ, 7, -1, 0, 1, 0);
    chk(rsp_hit && rsp_data == 32'hDEADBEEF && rsp_page == 20, "read data returned");
    x_off = 2;
    cycle(OP_WRITE, 7, -1, 0, 1, 1);
    chk(rsp_hit && rsp_op == OP_WRITE, "write performed");

    // TEST mode: direct class/page/offset access
    test_mode = 1; x_tcls = 7; x_tpage = 100; x_off = 1;
    x_valid = 1; x_op = OP_READ;
    #1;
    chk(rsl == (Y'(1) << 100) && off == 1, "test mode selects page directly");
    cycle(OP_READ, 0, -1, 7, 1, 0);
    chk(rsp_hit && rsp_cls == 7 && rsp_page == 100, "test mode read response");
    cycle(OP_WRITE, 0, -1, 7, 1, 1);
    test_mode = 0;

    // insert into a full group of four classes fails after three overflows
    cycle(OP_INSERT, 4, -1, 4, 0, 0);
    cycle(OP_INSERT, 4, -1, 5, 0, 0);
    cycle(OP_INSERT, 4, -1, 6, 0, 0);
    cycle(OP_INSERT, 4, -1, 7, 1, 0);
    chk(!rsp_hit && rsp_ovf == 3, "insert fails after three overflows");
    cycle(OP_SEARCH, 4, -1, 4, 1, 0);
    chk(!rsp_hit && rsp_ovf == 0, "failed insert left the count alone");
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
