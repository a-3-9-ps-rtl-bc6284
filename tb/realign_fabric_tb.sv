// realign_fabric_tb: checks the rewiring with a custom permutation
// (output k takes raw bit (5k+3) mod 16) and with the default physical order,
// both with the sum-output polarity correction (even raw bits inverted).
module realign_fabric_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int NB = 16;
  localparam int IW = 4;

  function automatic logic [NB*IW-1:0] perm_map();
    logic [NB*IW-1:0] m;
    for (int k = 0; k < NB; k++) m[k*IW +: IW] = IW'((5 * k + 3) % NB);
    return m;
  endfunction

  localparam logic [NB*IW-1:0] MAP = perm_map();

  logic clk = 1'b0;
  logic [NB-1:0] raw, therm_c, therm_d, raw_s;
  int checks = 0, failures = 0;

  realign_fabric #(.NBITS(NB), .IDX_W(IW), .CUSTOM_MAP(1'b1), .MAP(MAP)) dut_c (
    .clk, .raw, .therm(therm_c));
  realign_fabric #(.NBITS(NB), .IDX_W(IW)) dut_d (.clk, .raw, .therm(therm_d));

  always #1000 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_c, exp_d;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      raw = NB'($urandom);
      raw_s = raw;
      @(posedge clk);
      #1;
      for (int k = 0; k < NB; k++) begin
        int src;
        src = (5 * k + 3) % NB;
        exp_c = raw_s[src] ^ (src % 2 == 0);
        exp_d = raw_s[k] ^ (k % 2 == 0);
        checks += 2;
        if (therm_c[k] != exp_c) begin failures++; $display("custom bit %0d wrong", k); end
        if (therm_d[k] != exp_d) begin failures++; $display("default bit %0d wrong", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
