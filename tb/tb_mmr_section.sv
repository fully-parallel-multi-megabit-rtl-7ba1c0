// tb_mmr_section: exhaustive test of the lowest-level resolver section.
// For all 2^8 match patterns, with and without inhibit, checks that only
// the lowest-numbered active input is passed on, that inhibit blocks all
// outputs, and that hit reports any active input regardless of inhibit.
module tb_mmr_section;
  localparam int unsigned N = 8;

  logic         inh, hit;
  logic [N-1:0] ml, out, exp_out;
  int           checks = 0, failures = 0;

  mmr_section #(.N(N)) dut (.*);

  initial begin
    for (int v = 0; v < (1 << N); v++)
      for (int h = 0; h < 2; h++) begin
        ml = N'(v); inh = 1'(h);
        #1;
        exp_out = '0;
        if (!inh)
          for (int i = 0; i < int'(N); i++)
            if (ml[i]) begin exp_out[i] = 1'b1; break; end
        checks++;
        if (out !== exp_out || hit !== (v != 0)) begin
          failures++;
          $display("FAIL ml=%b inh=%0b out=%b hit=%0b", ml, inh, out, hit);
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
