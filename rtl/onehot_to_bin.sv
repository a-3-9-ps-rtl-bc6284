// onehot_to_bin: one-hot code to binary code encoding.
//
// The binary fine code is the number of sampled bits the edge has passed:
// one-hot bit k gives code k+1 (00001000 -> 4 = 100b, as in the published design's
// example). Each code bit is the OR of the one-hot bits whose code has that
// bit set, so the encoder is a bank of OR trees. An all-zero input gives 0.
// Interface: onehot and its hit flag in; code and valid out, registered (one
// cycle latency). The encoding follows the published design; the k+1 offset matches
// its example and the register is this design's own.
module onehot_to_bin #(
  parameter int unsigned NBITS = 860,
  parameter int unsigned CODE_W = $clog2(NBITS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NBITS-1:0]  onehot,
  input  logic              hit,
  output logic [CODE_W-1:0] code,
  output logic              valid
);
  timeunit 1ps; timeprecision 1fs;

  logic [CODE_W-1:0] enc;

  always_comb begin
    enc = '0;
    for (int k = 0; k < NBITS; k++)
      if (onehot[k]) enc = enc | CODE_W'(k + 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      code  <= enc;
      valid <= hit;
    end
  end
endmodule
