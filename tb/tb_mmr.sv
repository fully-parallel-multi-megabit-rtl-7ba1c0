// tb_mmr: self-checking test of the hierarchical multiple-match resolver.
// Two configurations are checked side by side: the 128-input resolver of
// the 1 Mb memory (8-input sections under two 4-way levels) and the
// 16-input resolver of the test chip (four 4-input sections). Each gets
// single matches at every position, random dense and sparse patterns,
// and inhibit; the expected winner is the lowest-numbered active input.
module tb_mmr;
  localparam int unsigned N1 = 128;
  localparam int unsigned N2 = 16;

  logic          inh;
  logic [N1-1:0] ml1, out1;
  logic [N2-1:0] ml2, out2;
  logic          hit1, hit2;
  int            checks = 0, failures = 0;

  mmr #(.N(N1), .LEAF(8), .FAN(4)) dut1 (.inh(inh), .ml(ml1), .out(out1), .hit(hit1));
  mmr #(.N(N2), .LEAF(4), .FAN(4)) dut2 (.inh(inh), .ml(ml2), .out(out2), .hit(hit2));

  function automatic logic [N1-1:0] lowest1(input logic [N1-1:0] v);
    lowest1 = '0;
    for (int i = 0; i < int'(N1); i++) if (v[i]) begin lowest1[i] = 1'b1; break; end
  endfunction

  function automatic logic [N2-1:0] lowest2(input logic [N2-1:0] v);
    lowest2 = '0;
    for (int i = 0; i < int'(N2); i++) if (v[i]) begin lowest2[i] = 1'b1; break; end
  endfunction

  task automatic apply(input logic [N1-1:0] v1, input logic [N2-1:0] v2, input logic h);
    ml1 = v1; ml2 = v2; inh = h;
    #1;
    checks++;
    if (out1 !== (h ? '0 : lowest1(v1)) || hit1 !== (v1 != '0)) begin
      failures++;
      $display("FAIL N=128 ml=%h inh=%0b out=%h hit=%0b", v1, h, out1, hit1);
    end
    checks++;
    if (out2 !== (h ? '0 : lowest2(v2)) || hit2 !== (v2 != '0)) begin
      failures++;
      $display("FAIL N=16 ml=%h inh=%0b out=%h hit=%0b", v2, h, out2, hit2);
    end
  endtask

  initial begin
    logic [N1-1:0] v1, t1;
    logic [N2-1:0] v2;
    apply('0, '0, 1'b0);
    for (int i = 0; i < int'(N1); i++) begin
      v1 = '0; v1[i] = 1'b1;
      v2 = '0; v2[i % N2] = 1'b1;
      apply(v1, v2, 1'b0);
      // add matches above the single one: the lowest still wins
      v1 = v1 | (v1 << 1) | (v1 << 9) | (v1 << 40);
      v2 = v2 | (v2 << 3) | (v2 << 5);
      apply(v1, v2, 1'b0);
    end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < int'(N1); i += 32) v1[i +: 32] = $urandom;
      if (n % 2 == 0) begin
        for (int i = 0; i < int'(N1); i += 32) t1[i +: 32] = $urandom & $urandom & $urandom;
        v1 = v1 & t1 & (N1'(1) << ($urandom % N1) | {N1{n % 4 == 0}});
      end
      v2 = N2'($urandom) & (n % 3 == 0 ? N2'($urandom) : '1);
      apply(v1, v2, n % 10 == 0);
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
