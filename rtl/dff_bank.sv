// dff_bank: the D flip-flop bank that samples the delay line.
//
// Every tap of the chain offers two outputs, the sum output O_j and the carry
// output CO_j; both are registered in the same slice at the rising system clock
// edge (dual sampling). The bank presents them as one raw code in physical
// order, bit 2j = S_j (sampled O_j) and bit 2j+1 = CS_j (sampled CO_j), which
// is the order they leave the chain in the block diagram.
// Interface: o, co from the chain; raw (2*TAPS bits) one cycle later.
// Sampling both outputs and the S/CS naming follow the published design; the bit
// order of the raw code is this design's own convention.
module dff_bank #(
  parameter int unsigned TAPS = 430
) (
  input  logic              clk,
  input  logic [TAPS-1:0]   o,
  input  logic [TAPS-1:0]   co,
  output logic [2*TAPS-1:0] raw
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    for (int j = 0; j < TAPS; j++) begin
      raw[2*j]   <= o[j];
      raw[2*j+1] <= co[j];
    end
  end
endmodule
