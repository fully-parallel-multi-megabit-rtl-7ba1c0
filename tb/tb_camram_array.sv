// tb_camram_array: self-checking test of the integrated array at the test
// chip size (b = 8, C = 16, y = 16, r = 2). Fills all words, marks some
// entries valid, and checks the match lines of searches for stored keys,
// near-miss keys (one bit different, so a single sub-array pulls the line
// down) and random keys, together with word reads and the valid plane.
module tb_camram_array;
  localparam int unsigned B    = 8;
  localparam int unsigned C    = 16;
  localparam int unsigned Y    = 16;
  localparam int unsigned R    = 2;
  localparam int unsigned COLS = Y << R;
  localparam int unsigned CW   = 4;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [CW-1:0]   cls;
  logic            search_en, we, set_valid;
  logic [B-1:0]    ref_data, q, wdata;
  logic [Y-1:0]    ml, valid_row, rsl;
  logic [COLS-1:0] drsl;
  logic [B-1:0]    words [C][COLS];
  logic [Y-1:0]    vmodel [C];
  int              checks = 0, failures = 0;

  camram_array #(.B(B), .C(C), .Y(Y), .R(R)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_search();
    logic [Y-1:0] exp;
    for (int p = 0; p < int'(Y); p++)
      exp[p] = search_en && vmodel[cls][p] && (words[cls][p << R] == ref_data);
    checks++;
    if (ml !== exp || valid_row !== vmodel[cls]) begin
      failures++;
      $display("FAIL class %0d ref %h: ml=%h expected %h valid=%h", cls, ref_data, ml, exp, valid_row);
    end
  endtask

  initial begin
    int col, p;
    rst_n = 0; we = 0; set_valid = 0; search_en = 0; cls = '0; drsl = '0; rsl = '0;
    ref_data = '0; wdata = '0;
    for (int c = 0; c < int'(C); c++) vmodel[c] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < int'(C); c++)
      for (int k = 0; k < int'(COLS); k++) begin
        cls = CW'(c); drsl = '0; drsl[k] = 1'b1; we = 1; wdata = B'($urandom);
        words[c][k] = wdata;
        // mark about half the entries valid while writing their keys
        set_valid = (k % (1 << R) == 0) && ($urandom % 2 == 0);
        rsl = '0; rsl[k >> R] = 1'b1;
        @(negedge clk);
        if (set_valid) vmodel[c][k >> R] = 1'b1;
      end
    we = 0; set_valid = 0;
    for (int n = 0; n < 4000; n++) begin
      cls = CW'($urandom);
      p = $urandom % Y;
      col = $urandom % COLS;
      drsl = '0; drsl[col] = 1'b1;
      search_en = ($urandom % 8) != 0;
      case ($urandom % 3)
        0: ref_data = words[cls][p << R];
        1: ref_data = words[cls][p << R] ^ (B'(1) << ($urandom % B));
        default: ref_data = B'($urandom);
      endcase
      we = ($urandom % 4) == 0;
      wdata = B'($urandom);
      set_valid = ($urandom % 8) == 0;
      rsl = '0; rsl[p] = 1'b1;
      #1;
      check_search();
      checks++;
      if (q !== words[cls][col]) begin
        failures++;
        $display("FAIL read class %0d column %0d: %h expected %h", cls, col, q, words[cls][col]);
      end
      @(negedge clk);
      if (we) words[cls][col] = wdata;
      if (set_valid) vmodel[cls][p] = 1'b1;
    end
    // reset clears the valid plane: nothing matches afterwards
    rst_n = 0; #1 rst_n = 1;
    for (int c = 0; c < int'(C); c++) vmodel[c] = '0;
    we = 0; set_valid = 0; search_en = 1;
    for (int c = 0; c < int'(C); c++) begin
      cls = CW'(c); ref_data = words[c][0];
      #1;
      check_search();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
