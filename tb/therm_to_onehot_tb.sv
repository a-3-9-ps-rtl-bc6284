// therm_to_onehot_tb: feeds thermometer codes with a leading run of n ones,
// sometimes followed by stray ones further up (a draining earlier edge), and
// checks that only the end of the leading run is marked and that a hit is
// flagged exactly when bit 0 goes from 0 to 1 between samples.
module therm_to_onehot_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int NB = 24;
  logic clk = 1'b0, rst = 1'b1;
  logic [NB-1:0] therm, onehot, exp_oh;
  logic hit, exp_hit, prev0;
  int checks = 0, failures = 0;

  therm_to_onehot #(.NBITS(NB)) dut (.clk, .rst, .therm, .onehot, .hit);

  always #1000 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    int nhits;
    nhits = 0;
    therm = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    prev0 = 1'b0;
    therm = '0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      n = $urandom_range(0, NB);
      therm = '0;
      for (int k = 0; k < n; k++) therm[k] = 1'b1;
      if (n < NB - 1 && $urandom_range(0, 1) == 1)
        for (int k = n + 1; k < NB; k++) therm[k] = 1'($urandom_range(0, 1));
      exp_oh = '0;
      if (n > 0) exp_oh[n-1] = 1'b1;
      exp_hit = therm[0] & ~prev0;
      prev0 = therm[0];
      @(posedge clk);
      #1 checks += 2;
      if (onehot != exp_oh) begin
        failures++;
        $display("therm %b: onehot %b expected %b", therm, onehot, exp_oh);
      end
      if (hit != exp_hit) begin failures++; $display("therm %b: hit %b", therm, hit); end
      if (hit) nhits++;
    end
    checks++;
    if (nhits == 0) begin failures++; $display("no hit was ever flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
