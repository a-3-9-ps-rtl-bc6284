// realign_fabric: bin realignment, a fixed rewiring of the sampled bits from
// physical tap order into the order in which the hit edge reaches them.
//
// Because tap delays and the clock skew on the flip-flops differ, the raw code
// is not a clean thermometer code (bubbles, e.g. 00010111). Sorting the bits by
// measured arrival time once, and wiring them in that order, turns every
// sample into a pure thermometer code (00001111) and removes the zero and
// negative-width bins. The sort order is found off line by a code density
// measurement of each bit and is given to this block as the parameter MAP:
// output bit k is raw bit MAP[k], held in IDX_W-bit field k of MAP. Sum outputs
// O_j are the inverse of the carry, so bits set in INV are inverted first,
// which makes every bit rise to 1 when the edge passes it.
// When CUSTOM_MAP is 0 the fabric uses the physical order S_0, CS_0, S_1,
// CS_1, ... (MAP is then ignored).
// Interface: raw code in, therm code out, registered (one cycle latency).
// The rewiring by measured arrival order follows the published design; the polarity
// correction and the output register are this design's own.
module realign_fabric #(
  parameter int unsigned NBITS = 860,
  parameter int unsigned IDX_W = $clog2(NBITS),
  parameter bit          CUSTOM_MAP = 1'b0,
  parameter logic [NBITS*IDX_W-1:0] MAP = '0,
  parameter logic [NBITS-1:0] INV = {(NBITS/2){2'b01}}
) (
  input  logic             clk,
  input  logic [NBITS-1:0] raw,
  output logic [NBITS-1:0] therm
);
  timeunit 1ps; timeprecision 1fs;

  logic [NBITS-1:0] rising;   // every bit 0 before the edge, 1 after it
  logic [NBITS-1:0] ordered;

  assign rising = raw ^ INV;

  for (genvar k = 0; k < NBITS; k++) begin : g_map
    localparam int unsigned SRC = CUSTOM_MAP ? int'(MAP[k*IDX_W +: IDX_W]) : k;
    assign ordered[k] = rising[SRC];
  end

  always_ff @(posedge clk) therm <= ordered;
endmodule
