// tb_drsl_decode: self-checking test of the decoded responder select lines.
// For every page and every offset, checks that exactly column
// page * 2^r + offset is selected, and that no column is selected when no
// responder line is high.
module tb_drsl_decode;
  localparam int unsigned Y = 128;
  localparam int unsigned R = 3;

  logic [Y-1:0]      rsl;
  logic [R-1:0]      off;
  logic [(Y<<R)-1:0] drsl;
  int                checks = 0, failures = 0;

  drsl_decode #(.Y(Y), .R(R)) dut (.*);

  initial begin
    for (int p = 0; p < int'(Y); p++)
      for (int k = 0; k < (1 << R); k++) begin
        rsl = '0; rsl[p] = 1'b1; off = R'(k);
        #1;
        for (int c = 0; c < int'(Y << R); c++) begin
          checks++;
          if (drsl[c] !== (c == p * (1 << R) + k)) begin
            failures++;
            $display("FAIL page %0d off %0d column %0d = %0b", p, k, c, drsl[c]);
          end
        end
      end
    rsl = '0;
    for (int k = 0; k < (1 << R); k++) begin
      off = R'(k);
      #1;
      checks++;
      if (drsl !== '0) begin
        failures++;
        $display("FAIL no responder, off %0d selects a column", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
