// thermo_bin_encoder: the thermometer-to-binary encoder, two pipelined stages.
//
// Stage 1 (therm_to_onehot) finds the end of the leading run of ones and
// detects a new hit; stage 2 (onehot_to_bin) turns the one-hot position k into
// the code k+1. Interface: the realigned thermometer code in; code and valid
// out two clock cycles later. The split into these two stages follows the
// published design's block diagram.
module thermo_bin_encoder #(
  parameter int unsigned NBITS = 860,
  parameter int unsigned CODE_W = $clog2(NBITS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NBITS-1:0]  therm,
  output logic [CODE_W-1:0] code,
  output logic              valid
);
  timeunit 1ps; timeprecision 1fs;

  logic [NBITS-1:0] onehot;
  logic             hit;

  therm_to_onehot #(.NBITS(NBITS)) u_t2o (
    .clk, .rst, .therm, .onehot, .hit
  );

  onehot_to_bin #(.NBITS(NBITS), .CODE_W(CODE_W)) u_o2b (
    .clk, .rst, .onehot, .hit, .code, .valid
  );
endmodule
