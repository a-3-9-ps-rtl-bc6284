// coarse_counter_tb: checks that the coarse counter clears on reset, counts
// one per clock and wraps at 2**WIDTH (WIDTH reduced to 6 to see the wrap).
module coarse_counter_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int W = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int expected;

  coarse_counter #(.WIDTH(W)) dut (.clk, .rst, .count);

  always #1000 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 checks++;
    if (count != 0) begin failures++; $display("count %0d after reset", count); end
    rst = 1'b0;
    expected = 0;
    for (int i = 0; i < 150; i++) begin
      @(posedge clk);
      expected = (expected + 1) % (1 << W);
      #1 checks++;
      if (count != W'(expected)) begin
        failures++;
        $display("cycle %0d: count %0d, expected %0d", i, count, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
