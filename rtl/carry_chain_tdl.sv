// carry_chain_tdl: behavioural model of the tapped delay line (not synthesizable
// logic: in the FPGA this is a column of CARRY8 primitives, one per slice).
//
// The chain is a cascade of TAPS carry taps, eight per slice. Each tap passes
// its carry-in CI_j on to CO_j (which is CI_(j+1)) and also drives a sum output
// O_j = LUT_j XOR CI_j. With the LUT output held at 1 the multiplexer always
// propagates the carry, so O_j is the inverse of CI_j and changes a little
// after CI_j, before or after CO_j. Both O_j and CO_j are brought out so that
// the flip-flop bank can sample each tap twice (dual sampling).
//
// Interface: `launch` is the rising step from the pulse launcher (CI_0);
// o[j] and co[j] are the two outputs of tap j. Timing: every output is a
// transport delay of its input; delays come from tdl_delay_pkg, seeded by
// SEED. The tap structure (carry mux, XOR, two flip-flop inputs per tap) and
// the 430-tap length follow the published design; the delay spread, the LUT value of
// 1 and the per-slice clock skew (modelled as extra delay on both outputs of a
// slice) are this model's own. With the defaults every O_j lands between CI_j
// and CO_j and there is no skew, so the chain has no bubbles; raise
// XOR_PCT_SPAN above 80 or SKEW_MAX_FS above 0 to make bubbles.
module carry_chain_tdl
  import tdl_delay_pkg::*;
#(
  parameter int unsigned TAPS         = 430,
  parameter int unsigned SEED         = 1,
  parameter int unsigned TAP_MIN_FS   = 3700, // carry delay: 3.7 .. 5.7 ps, mean 4.7 ps
  parameter int unsigned TAP_SPAN_FS  = 2001,
  parameter int unsigned XOR_PCT_MIN  = 20,   // sum delay as a share of the carry delay
  parameter int unsigned XOR_PCT_SPAN = 61,
  parameter int unsigned SKEW_MAX_FS  = 0
) (
  input  logic            launch,
  output logic [TAPS-1:0] o,
  output logic [TAPS-1:0] co
);
  timeunit 1ps; timeprecision 1fs;

  // Each tap keeps its carry-in and carry-out as nets of its own, so a
  // change at one tap wakes only the next tap in simulation.
  for (genvar j = 0; j < TAPS; j++) begin : g_tap
    localparam realtime CARRY_D = real'(tap_fs(j, SEED, TAP_MIN_FS, TAP_SPAN_FS)) / 1000.0;
    localparam realtime SUM_D   = real'(xor_fs(j, SEED, TAP_MIN_FS, TAP_SPAN_FS,
                                               XOR_PCT_MIN, XOR_PCT_SPAN)) / 1000.0;
    localparam realtime SKEW_D  = real'(skew_fs(j / 8, SEED, SKEW_MAX_FS)) / 1000.0;
    logic cin, cout, lut_out;
    if (j == 0) begin : g_first
      assign cin = launch;
    end else begin : g_next
      assign cin = g_tap[j-1].cout;
    end
    assign lut_out = 1'b1;                       // propagate: select CI as carry
    assign #(CARRY_D) cout = cin;                // carry multiplexer
    assign #(SUM_D + SKEW_D) o[j] = lut_out ^ cin;
    assign #(SKEW_D) co[j] = cout;
  end
endmodule
