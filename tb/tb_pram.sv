// tb_pram: self-checking test of the pre-classification RAM.
// Fills the table with random classes, then reads every entry and checks
// the one-cycle read latency, that the output holds while rd_en is low,
// and that a write during operation changes only the entry written.
module tb_pram;
  localparam int unsigned AW = 6;
  localparam int unsigned CW = 5;

  logic          clk = 1'b0;
  logic          rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [CW-1:0] rd_class, wr_class;
  logic [CW-1:0] model [2**AW];
  int            checks = 0, failures = 0;

  pram #(.AW(AW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [CW-1:0] got, input logic [CW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_class = '0;
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_class = CW'($urandom); model[a] = wr_class;
      @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < 2**AW; a++) begin
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_class, model[a], $sformatf("read %0d", a));
    end
    // hold while rd_en is low
    rd_en = 0; rd_addr = 0;
    repeat (3) begin
      @(negedge clk);
      check(rd_class, model[2**AW-1], "hold");
    end
    // rewrite during operation
    for (int n = 0; n < 200; n++) begin
      wr_en = 1; wr_addr = AW'($urandom); wr_class = CW'($urandom);
      rd_en = 1; rd_addr = AW'($urandom);
      @(negedge clk);
      check(rd_class, model[rd_addr], "read during write");
      model[wr_addr] = wr_class;
    end
    wr_en = 0;
    for (int a = 0; a < 2**AW; a++) begin
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_class, model[a], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
