// tb_bit_subarray: self-checking test of one bit sub-array at its default
// size (32 classes x 1024 columns). Fills every cell through the DRSL
// write path, then mixes random writes, reads of single columns, and
// searches of whole class rows, checking q and every CAM column's
// pull-down against a model of the cells.
module tb_bit_subarray;
  localparam int unsigned C    = 32;
  localparam int unsigned Y    = 128;
  localparam int unsigned R    = 3;
  localparam int unsigned COLS = Y << R;
  localparam int unsigned CW   = 5;

  logic            clk = 1'b0;
  logic [CW-1:0]   cls;
  logic            search_en, ref_bit, q, we, wbit;
  logic [Y-1:0]    pd;
  logic [COLS-1:0] drsl;
  logic [COLS-1:0] model [C];
  int              checks = 0, failures = 0;

  bit_subarray #(.C(C), .Y(Y), .R(R)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_row();
    for (int p = 0; p < int'(Y); p++) begin
      checks++;
      if (pd[p] !== (search_en && (model[cls][p << R] != ref_bit))) begin
        failures++;
        $display("FAIL search class %0d page %0d: pd=%0b", cls, p, pd[p]);
      end
    end
  endtask

  initial begin
    int col;
    we = 0; wbit = 0; search_en = 0; ref_bit = 0; cls = '0; drsl = '0;
    @(negedge clk);
    for (int c = 0; c < int'(C); c++)
      for (int k = 0; k < int'(COLS); k++) begin
        cls = CW'(c); drsl = '0; drsl[k] = 1'b1; we = 1; wbit = 1'($urandom);
        model[c][k] = wbit;
        @(negedge clk);
      end
    we = 0;
    for (int n = 0; n < 6000; n++) begin
      cls = CW'($urandom);
      col = $urandom % COLS;
      if (n % 3 == 0) col = ($urandom % Y) << R;  // a CAM column
      drsl = '0; drsl[col] = 1'b1;
      search_en = 1'($urandom);
      ref_bit = 1'($urandom);
      we = ($urandom % 3) == 0;
      wbit = 1'($urandom);
      #1;
      checks++;
      if (q !== model[cls][col]) begin
        failures++;
        $display("FAIL read class %0d column %0d: q=%0b expected %0b", cls, col, q, model[cls][col]);
      end
      check_row();
      @(negedge clk);
      if (we) model[cls][col] = wbit;
    end
    // no column selected reads 0 and writes nothing
    we = 1; drsl = '0; wbit = 1'b1; search_en = 0;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL no DRSL: q=%0b", q); end
    @(negedge clk);
    we = 0;
    for (int c = 0; c < int'(C); c++)
      for (int k = 0; k < int'(COLS); k += 37) begin
        cls = CW'(c); drsl = '0; drsl[k] = 1'b1;
        #1;
        checks++;
        if (q !== model[c][k]) begin
          failures++;
          $display("FAIL final read class %0d column %0d", c, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
