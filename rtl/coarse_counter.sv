// coarse_counter: free-running count of system clock cycles, the coarse
// timestamp. It counts up by one at every rising clock edge and wraps at
// 2**WIDTH. Interface: clk, rst (synchronous, clears to 0); count.
// The counter follows the published design; its width and reset are this design's own.
module coarse_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
