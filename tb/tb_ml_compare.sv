// tb_ml_compare: self-checking test of the per-sub-array comparators.
// Drives random sensed bits and reference bits and checks that a column's
// pull-down is on exactly when the search is enabled and its bit differs.
module tb_ml_compare;
  localparam int unsigned Y = 128;

  logic         search_en, ref_bit;
  logic [Y-1:0] sao, pd;
  int           checks = 0, failures = 0;

  ml_compare #(.Y(Y)) dut (.*);

  initial begin
    for (int n = 0; n < 500; n++) begin
      search_en = 1'($urandom);
      ref_bit   = 1'($urandom);
      for (int i = 0; i < int'(Y); i += 32) sao[i +: 32] = $urandom;
      if (n % 7 == 0) sao = {Y{ref_bit}};
      #1;
      for (int i = 0; i < int'(Y); i++) begin
        checks++;
        if (pd[i] !== (search_en && (sao[i] != ref_bit))) begin
          failures++;
          $display("FAIL column %0d: en=%0b ref=%0b sao=%0b pd=%0b", i, search_en, ref_bit, sao[i], pd[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
