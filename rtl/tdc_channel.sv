// tdc_channel: one dual-sampling tapped-delay-line TDC channel.
//
// A hit launches a rising step into a carry chain of TAPS taps. At each clock
// edge the flip-flop bank samples both outputs of every tap (2*TAPS bits), the
// realignment fabric puts the bits in arrival order and fixes their polarity,
// the encoder turns the thermometer code into the number of bits passed, the
// calibration block turns that code into a time from the hit to the clock
// edge, and the timestamp stage subtracts it from the coarse time of that edge.
//
// Pipeline from the sampling clock edge e: raw code after e, realigned after
// e+1, one-hot after e+2, code after e+3, fine time after e+4, timestamp after
// e+5. The pulse launcher re-arms HOLD_CYC + 3 cycles after a hit.
// Interface: hit (asynchronous), clk, rst, count (the shared coarse counter);
// ts/ts_valid and its parts, calibration status.
// The chain of blocks follows the published design's block diagram; the pipeline
// registers between stages are this design's own.
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned TAPS     = TAPS_DEFAULT,
  parameter int unsigned NBITS    = 2 * TAPS,
  parameter int unsigned IDX_W    = $clog2(NBITS),
  parameter int unsigned CODE_W   = $clog2(NBITS + 1),
  parameter int unsigned FINE_W   = FINE_W_DEFAULT,
  parameter int unsigned COARSE_W = COARSE_W_DEFAULT,
  parameter int unsigned NLOG     = NLOG_DEFAULT,
  parameter int unsigned HOLD_CYC = 2,
  parameter bit          CUSTOM_MAP = 1'b0,
  parameter logic [NBITS*IDX_W-1:0] MAP = '0,
  // behavioural chain model
  parameter int unsigned SEED         = 1,
  parameter int unsigned XOR_PCT_MIN  = 20,
  parameter int unsigned XOR_PCT_SPAN = 61,
  parameter int unsigned SKEW_MAX_FS  = 0
) (
  input  logic                       hit,
  input  logic                       clk,
  input  logic                       rst,
  input  logic [COARSE_W-1:0]        count,
  output logic [COARSE_W+FINE_W-1:0] ts,
  output logic [COARSE_W-1:0]        ts_coarse,
  output logic [FINE_W-1:0]          ts_fine,
  output logic                       ts_valid,
  output logic [15:0]                cal_rounds,
  output logic                       cal_updating,
  output logic                       busy
);
  timeunit 1ps; timeprecision 1fs;

  logic              launch;
  logic [TAPS-1:0]   o, co;
  logic [NBITS-1:0]  raw, therm;
  logic [CODE_W-1:0] code;
  logic              code_valid;
  logic [FINE_W-1:0] fine;
  logic              fine_valid;

  pulse_launcher #(.HOLD_CYC(HOLD_CYC)) u_launcher (
    .hit, .clk, .rst, .launch, .busy
  );

  carry_chain_tdl #(
    .TAPS(TAPS), .SEED(SEED), .XOR_PCT_MIN(XOR_PCT_MIN),
    .XOR_PCT_SPAN(XOR_PCT_SPAN), .SKEW_MAX_FS(SKEW_MAX_FS)
  ) u_chain (
    .launch, .o, .co
  );

  dff_bank #(.TAPS(TAPS)) u_bank (.clk, .o, .co, .raw);

  realign_fabric #(
    .NBITS(NBITS), .IDX_W(IDX_W), .CUSTOM_MAP(CUSTOM_MAP), .MAP(MAP)
  ) u_realign (.clk, .raw, .therm);

  thermo_bin_encoder #(.NBITS(NBITS), .CODE_W(CODE_W)) u_encoder (
    .clk, .rst, .therm, .code, .valid(code_valid)
  );

  online_calib #(
    .NBITS(NBITS), .CODE_W(CODE_W), .FINE_W(FINE_W), .NLOG(NLOG)
  ) u_calib (
    .clk, .rst, .code, .valid(code_valid), .fine, .fine_valid,
    .rounds(cal_rounds), .updating(cal_updating)
  );

  timestamp_out #(.COARSE_W(COARSE_W), .FINE_W(FINE_W), .LAT(4)) u_ts (
    .clk, .rst, .count, .fine, .fine_valid, .ts, .ts_coarse, .ts_fine, .ts_valid
  );
endmodule
