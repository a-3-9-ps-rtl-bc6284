// tdc_top: two dual-sampling TDC channels on one system clock and one coarse
// counter, the configuration measured in the published design (two identical
// channels, time interval = difference of their timestamps).
//
// Each channel turns an asynchronous hit into a timestamp
// ts = coarse * 2**FINE_W - fine, in units of Tclk / 2**FINE_W (about
// 0.03 ps at 500 MHz and FINE_W = 16). The clock comes from an external
// oscillator; the timestamps leave on plain ports (on the board they were read
// out over a serial link, which is not part of this RTL).
// Interface: clk (500 MHz), rst (synchronous, active high), hit[NCH];
// per channel ts, ts_valid, the coarse and fine parts and calibration status.
// Timing: ts_valid rises 6 cycles after the clock edge that first samples the
// hit. The carry chain inside each channel is a behavioural model; in an FPGA
// build it is replaced by the vendor's carry primitives.
// Two channels, 430 taps and the 500 MHz clock follow the published design; widths,
// the calibration length and the chain model's delays are this design's own.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned NCH      = 2,
  parameter int unsigned TAPS     = TAPS_DEFAULT,
  parameter int unsigned NBITS    = 2 * TAPS,
  parameter int unsigned IDX_W    = $clog2(NBITS),
  parameter int unsigned FINE_W   = FINE_W_DEFAULT,
  parameter int unsigned COARSE_W = COARSE_W_DEFAULT,
  parameter int unsigned NLOG     = NLOG_DEFAULT,
  parameter int unsigned HOLD_CYC = 2,
  parameter bit          CUSTOM_MAP = 1'b0,
  parameter logic [NCH-1:0][NBITS*IDX_W-1:0] MAP = '0,
  parameter int unsigned XOR_PCT_MIN  = 20,
  parameter int unsigned XOR_PCT_SPAN = 61,
  parameter int unsigned SKEW_MAX_FS  = 0
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [NCH-1:0]                      hit,
  output logic [NCH-1:0][COARSE_W+FINE_W-1:0] ts,
  output logic [NCH-1:0][COARSE_W-1:0]        ts_coarse,
  output logic [NCH-1:0][FINE_W-1:0]          ts_fine,
  output logic [NCH-1:0]                      ts_valid,
  output logic [NCH-1:0][15:0]                cal_rounds,
  output logic [NCH-1:0]                      cal_updating,
  output logic [NCH-1:0]                      busy
);
  timeunit 1ps; timeprecision 1fs;

  logic [COARSE_W-1:0] count;

  coarse_counter #(.WIDTH(COARSE_W)) u_coarse (.clk, .rst, .count);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tdc_channel #(
      .TAPS(TAPS), .NBITS(NBITS), .IDX_W(IDX_W), .FINE_W(FINE_W),
      .COARSE_W(COARSE_W), .NLOG(NLOG), .HOLD_CYC(HOLD_CYC),
      .CUSTOM_MAP(CUSTOM_MAP), .MAP(MAP[c]), .SEED(c + 1),
      .XOR_PCT_MIN(XOR_PCT_MIN), .XOR_PCT_SPAN(XOR_PCT_SPAN),
      .SKEW_MAX_FS(SKEW_MAX_FS)
    ) u_ch (
      .hit(hit[c]), .clk, .rst, .count,
      .ts(ts[c]), .ts_coarse(ts_coarse[c]), .ts_fine(ts_fine[c]),
      .ts_valid(ts_valid[c]), .cal_rounds(cal_rounds[c]),
      .cal_updating(cal_updating[c]), .busy(busy[c])
    );
  end
endmodule
