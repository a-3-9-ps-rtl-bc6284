// pulse_launcher: turns an asynchronous hit into a rising step on the carry
// chain input and re-arms itself once the step has been sampled.
//
// A flip-flop clocked by the hit's rising edge sets `launch`; its output is the
// carry-in of the delay line, so the step starts travelling at the hit time.
// `launch` is passed through a two-stage synchronizer into the clock domain.
// When the synchronized copy is high, `clr` is raised for HOLD_CYC cycles: it
// clears the flip-flop asynchronously and keeps it cleared while the falling
// step drains out of the chain. Hits during that dead time are ignored.
//
// Interface: hit (asynchronous), clk, rst (synchronous to clk, active high);
// launch (to the chain), busy (launch set or being cleared).
// Timing: the TDC samples the chain at the first clock edge after the hit and
// the next one; clr rises 2 edges after the hit and launch is re-armed after
// 2 + HOLD_CYC edges, giving a dead time of about 3 + HOLD_CYC clock periods.
// The published design only names this block; the synchronizer, the self-clearing and
// HOLD_CYC are this design's own.
module pulse_launcher #(
  parameter int unsigned HOLD_CYC = 2
) (
  input  logic hit,
  input  logic clk,
  input  logic rst,
  output logic launch,
  output logic busy
);
  timeunit 1ps; timeprecision 1fs;

  logic sync1, sync2;
  logic clr;
  logic [$clog2(HOLD_CYC + 1)-1:0] hold_cnt;
  logic async_clr;

  assign async_clr = clr | rst;

  always_ff @(posedge hit or posedge async_clr) begin
    if (async_clr) launch <= 1'b0;
    else           launch <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1    <= 1'b0;
      sync2    <= 1'b0;
      clr      <= 1'b0;
      hold_cnt <= '0;
    end else begin
      sync1 <= launch;
      sync2 <= sync1;
      if (clr) begin
        if (hold_cnt == $bits(hold_cnt)'(HOLD_CYC - 1)) begin
          clr   <= 1'b0;
          sync1 <= 1'b0;
          sync2 <= 1'b0;
        end
        hold_cnt <= hold_cnt + 1'b1;
      end else if (sync2) begin
        clr      <= 1'b1;
        hold_cnt <= '0;
      end
    end
  end

  assign busy = launch | sync1 | sync2 | clr;
endmodule
