// pulse_launcher_tb: a hit at a random moment must raise `launch` at once;
// launch must stay high through the next two clock edges (so the TDC samples
// it), drop right after the third edge, ignore hits while it is being cleared
// (HOLD_CYC = 2 cycles) and accept a new hit after that.
module pulse_launcher_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime TCLK = 2000.0;
  logic clk = 1'b0, rst = 1'b0, hit = 1'b0;
  logic launch, busy;
  int checks = 0, failures = 0;
  int ignored = 0;

  pulse_launcher #(.HOLD_CYC(2)) dut (.hit, .clk, .rst, .launch, .busy);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $realtime, what); end
  endtask

  task automatic pulse_hit(input realtime width);
    hit = 1'b1;
    #(width);
    hit = 1'b0;
  endtask

  initial begin
    #1 rst = 1'b1;               // a rising reset clears the launcher flip-flop
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 60; i++) begin
      @(posedge clk);
      #(real'($urandom_range(10, 1990)));
      check(!launch && !busy, "not idle before the hit");
      fork pulse_hit(300.0); join_none
      #0.001;
      check(launch, "launch did not rise with the hit");
      @(posedge clk); #1;
      check(launch, "launch dropped before the 1st edge was sampled");
      @(posedge clk); #1;
      check(launch, "launch dropped before the 2nd edge");
      @(posedge clk); #1;
      check(!launch && busy, "launch not cleared after the 3rd edge");
      if ($urandom_range(0, 1) == 1) begin
        #300;
        pulse_hit(200.0);
        check(!launch, "hit accepted during the dead time");
        ignored++;
      end
      @(posedge clk); #1;
      check(!launch, "launch re-armed too early");
      @(posedge clk); #1;
      check(!busy, "still busy after the hold time");
    end
    check(ignored > 0, "dead-time hit never tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
