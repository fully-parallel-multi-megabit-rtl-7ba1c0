// prio_enc: priority encoder of the CAM.
//
// The multiple-match resolver picks the lowest-numbered active match line
// (priority by physical position) and gives it as a one-hot vector, the
// responder select lines. A ROM-like encoder then forms its binary
// address: address bit k is the OR of the one-hot lines whose index has
// bit k set. hit is high when any input is active.
//
// Combinational. Taken from the published design: resolver plus ROM-like address
// encoding. The ROM is written as its OR-plane function. onehot[0] equals
// ml[0], since input 0 always has the highest priority.
module prio_enc #(
  parameter int unsigned N    = 128,
  parameter int unsigned LEAF = 8,
  parameter int unsigned FAN  = 4,
  localparam int unsigned AW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  ml,
  output logic [N-1:0]  onehot,
  output logic [AW-1:0] addr,
  output logic          hit
);

  mmr #(.N(N), .LEAF(LEAF), .FAN(FAN)) u_mmr (
    .inh (1'b0),
    .ml  (ml),
    .out (onehot),
    .hit (hit)
  );

  always_comb begin
    addr = '0;
    for (int i = 0; i < int'(N); i++)
      if (onehot[i]) addr = addr | AW'(i);
  end

endmodule
