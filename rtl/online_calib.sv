// online_calib: bin-by-bin calibration of the fine code by the code density
// method, with the calibration table rebuilt on line.
//
// Hits arrive uncorrelated with the clock, so the number of hits that land in
// a bin is proportional to its width. The block histograms the codes of
// N = 2**NLOG hits. It then walks the histogram once, code by code, and writes
// into a second table the centre of each bin measured from the clock edge:
//     t(c) = (2 * sum_{i<c} h(i) + h(c)) * 2**FINE_W / (2 * N)
// in units of Tclk / 2**FINE_W (N a power of two, so the division is a
// shift). When the walk ends the two tables swap and the next round starts;
// the walk also clears the histogram. Hits that come during the walk are
// calibrated with the current table but not counted. Right after reset the
// block spends NBITS+1 cycles clearing the histogram and filling the table
// with a linear guess (equal bins of Tclk / NBITS).
//
// Interface: code/valid from the encoder; fine/fine_valid one cycle later
// (fine = time from the hit to the sampling clock edge). `rounds` counts
// finished table updates; `updating` is high during the walk.
// Bin-by-bin calibration, code density and table updating follow the
// published design; the histogram length N, the two-table swap, the bin-centre
// formula and the linear start table are this design's own.
module online_calib
  import tdc_pkg::*;
#(
  parameter int unsigned NBITS  = 2 * TAPS_DEFAULT,
  parameter int unsigned CODE_W = $clog2(NBITS + 1),
  parameter int unsigned FINE_W = FINE_W_DEFAULT,
  parameter int unsigned NLOG   = NLOG_DEFAULT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CODE_W-1:0] code,
  input  logic              valid,
  output logic [FINE_W-1:0] fine,
  output logic              fine_valid,
  output logic [15:0]       rounds,
  output logic              updating
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NCODES = NBITS + 1;
  localparam int unsigned IDX_W  = $clog2(NCODES);
  localparam int unsigned H_W    = NLOG + 1;           // a bin can hold all N hits
  localparam int unsigned P_W    = H_W + 1 + FINE_W;   // (2*cum + h) << FINE_W
  localparam longint unsigned STEP_Q8 = (longint'(1) << (FINE_W + 8)) / longint'(NBITS);

  typedef enum logic [1:0] {S_INIT, S_COLLECT, S_UPDATE} state_t;
  state_t state;

  logic [H_W-1:0]    hist [NCODES];
  logic [FINE_W-1:0] table_mem [2*NCODES];
  logic              bank;                 // table in use for look-ups
  logic [IDX_W-1:0]  idx;
  logic [NLOG-1:0]   nhits;
  logic [H_W-1:0]    cum;
  logic [FINE_W+IDX_W+8:0] lin_q8;

  logic [H_W-1:0]    h_cur;
  logic [P_W-1:0]    num;
  logic [P_W-1:0]    t_new;
  logic [FINE_W-1:0] t_clip;
  logic [FINE_W-1:0] lin_val;

  assign h_cur   = hist[idx];
  assign num     = (P_W'(cum) * 2 + P_W'(h_cur)) << FINE_W;
  assign t_new   = num >> (NLOG + 1);
  assign t_clip  = (t_new >> FINE_W) != 0 ? '1 : t_new[FINE_W-1:0];
  assign lin_val = (lin_q8 < (FINE_W+IDX_W+9)'(STEP_Q8 / 2)) ? '0
                 : FINE_W'((lin_q8 - (FINE_W+IDX_W+9)'(STEP_Q8 / 2)) >> 8);
  assign updating = (state == S_UPDATE);

  // Look-up path.
  always_ff @(posedge clk) begin
    if (rst) fine_valid <= 1'b0;
    else     fine_valid <= valid;
    fine <= table_mem[(IDX_W+1)'((bank ? NCODES : 0) + int'(code))];
  end

  // Histogram and table maintenance.
  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_INIT;
      idx    <= '0;
      bank   <= 1'b0;
      nhits  <= '0;
      cum    <= '0;
      lin_q8 <= '0;
      rounds <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          hist[idx]      <= '0;
          table_mem[(IDX_W+1)'(idx)] <= lin_val;
          lin_q8         <= lin_q8 + (FINE_W+IDX_W+9)'(STEP_Q8);
          if (idx == IDX_W'(NCODES - 1)) begin
            idx   <= '0;
            nhits <= '0;
            state <= S_COLLECT;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_COLLECT: begin
          if (valid) begin
            hist[code] <= hist[code] + 1'b1;
            nhits      <= nhits + 1'b1;
            if (nhits == '1) begin
              idx   <= '0;
              cum   <= '0;
              state <= S_UPDATE;
            end
          end
        end
        S_UPDATE: begin
          table_mem[(IDX_W+1)'((bank ? 0 : NCODES) + int'(idx))] <= t_clip;
          hist[idx] <= '0;
          cum       <= cum + h_cur;
          if (idx == IDX_W'(NCODES - 1)) begin
            idx    <= '0;
            nhits  <= '0;
            bank   <= ~bank;
            rounds <= rounds + 1'b1;
            state  <= S_COLLECT;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end
endmodule
