// therm_to_onehot: thermometer code to one-hot code conversion, with hit
// detection.
//
// The realigned code has ones in the bits the edge has passed (bit 0 first),
// e.g. 00001111. The one-hot code marks the last 1 of the leading run of ones
// (00001000): onehot[k] = therm[0] & ... & therm[k] & ~therm[k+1]; if every bit
// is 1 the top bit is marked. Taking only the leading run keeps the output
// one-hot even when the tail of an earlier, draining edge is still in the
// chain. A new hit is reported when bit 0 is 1 now and was 0 in the previous
// sample: the edge entered the chain in the last clock period.
// Interface: therm in; onehot and hit out, registered (one cycle latency).
// The conversion itself follows the published design; the leading-run rule and the
// hit detection are this design's own.
module therm_to_onehot #(
  parameter int unsigned NBITS = 860
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NBITS-1:0] therm,
  output logic [NBITS-1:0] onehot,
  output logic             hit
);
  timeunit 1ps; timeprecision 1fs;

  logic [NBITS-1:0] prefix;   // prefix[k] = therm[0] & ... & therm[k]
  logic [NBITS-1:0] oh_next;
  logic             first_prev;

  assign prefix[0] = therm[0];
  for (genvar k = 1; k < NBITS; k++) begin : g_prefix
    assign prefix[k] = prefix[k-1] & therm[k];
  end

  always_comb begin
    for (int k = 0; k < NBITS - 1; k++) oh_next[k] = prefix[k] & ~therm[k+1];
    oh_next[NBITS-1] = prefix[NBITS-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      onehot     <= '0;
      hit        <= 1'b0;
      first_prev <= 1'b1;
    end else begin
      onehot     <= oh_next;
      hit        <= therm[0] & ~first_prev;
      first_prev <= therm[0];
    end
  end
endmodule
