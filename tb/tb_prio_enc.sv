// tb_prio_enc: self-checking test of the priority encoder (resolver plus
// address encoder) at its 128-input default. Checks the one-hot output,
// the binary address of the winner and hit for single, multiple and
// random matches.
module tb_prio_enc;
  localparam int unsigned N  = 128;
  localparam int unsigned AW = 7;

  logic [N-1:0]  ml, onehot;
  logic [AW-1:0] addr;
  logic          hit;
  int            checks = 0, failures = 0;

  prio_enc #(.N(N), .LEAF(8), .FAN(4)) dut (.*);

  task automatic apply(input logic [N-1:0] v);
    int low;
    ml = v;
    #1;
    low = -1;
    for (int i = N - 1; i >= 0; i--) if (v[i]) low = i;
    checks++;
    if (low < 0) begin
      if (hit !== 1'b0 || onehot !== '0) begin
        failures++;
        $display("FAIL no match: hit=%0b onehot=%h", hit, onehot);
      end
    end else if (hit !== 1'b1 || addr !== AW'(low) || onehot !== (N'(1) << low)) begin
      failures++;
      $display("FAIL ml=%h: hit=%0b addr=%0d expected %0d", v, hit, addr, low);
    end
  endtask

  initial begin
    logic [N-1:0] v;
    apply('0);
    for (int i = 0; i < int'(N); i++) begin
      v = '0; v[i] = 1'b1;
      apply(v);
      apply(v | (v << 7) | ~(v - 1'b1));
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < int'(N); i += 32) v[i +: 32] = $urandom & $urandom & $urandom & $urandom;
      if (n % 3 == 0) v = v & (N'(1) << ($urandom % N));
      apply(v);
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
