// timestamp_out: joins the coarse and the fine timestamp of a hit.
//
// The fine time is the time from the hit to the clock edge that first saw it,
// in units of Tclk / 2**FINE_W, and the coarse time is the cycle count at that
// edge. The hit time is therefore
//     ts = coarse_at_edge * 2**FINE_W - fine.
// The fine result reaches this block LAT cycles after that edge, while the
// shared counter keeps running, so the coarse value used is count - LAT.
// Interface: count (shared coarse counter), fine/fine_valid in; ts, its coarse
// and fine parts and ts_valid out, registered (one cycle latency).
// Combining coarse and fine time into one timestamp follows the published design; the
// subtraction form, LAT and the widths are this design's own.
module timestamp_out #(
  parameter int unsigned COARSE_W = 32,
  parameter int unsigned FINE_W   = 16,
  parameter int unsigned LAT      = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [COARSE_W-1:0]        count,
  input  logic [FINE_W-1:0]          fine,
  input  logic                       fine_valid,
  output logic [COARSE_W+FINE_W-1:0] ts,
  output logic [COARSE_W-1:0]        ts_coarse,
  output logic [FINE_W-1:0]          ts_fine,
  output logic                       ts_valid
);
  timeunit 1ps; timeprecision 1fs;

  logic [COARSE_W-1:0] coarse_at_edge;
  assign coarse_at_edge = count - COARSE_W'(LAT);

  always_ff @(posedge clk) begin
    if (rst) begin
      ts_valid <= 1'b0;
    end else begin
      ts_valid <= fine_valid;
    end
    if (fine_valid) begin
      ts_coarse <= coarse_at_edge;
      ts_fine   <= fine;
      ts        <= {coarse_at_edge, FINE_W'(0)} - (COARSE_W + FINE_W)'(fine);
    end
  end
endmodule
