// thermo_bin_encoder_tb: at the full 860-bit width, random thermometer codes
// must come out as the number of leading ones two cycles later, and a hit must
// be reported only when bit 0 rises between consecutive samples.
module thermo_bin_encoder_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int NB = 860;
  localparam int CW = $clog2(NB + 1);
  logic clk = 1'b0, rst = 1'b1;
  logic [NB-1:0] therm;
  logic [CW-1:0] code;
  logic valid;
  int exp_code [$];
  logic exp_valid [$];
  int checks = 0, failures = 0;

  thermo_bin_encoder #(.NBITS(NB)) dut (.clk, .rst, .therm, .code, .valid);

  always #1000 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, nvalid;
    logic prev0;
    therm = '0;
    nvalid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    prev0 = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // a hit every few samples, otherwise an idle or fully passed chain
      case ($urandom_range(0, 3))
        0: n = 0;
        1: n = NB;
        default: n = $urandom_range(1, NB);
      endcase
      therm = '0;
      for (int k = 0; k < n; k++) therm[k] = 1'b1;
      exp_code.push_back(n);
      exp_valid.push_back(therm[0] & ~prev0);
      prev0 = therm[0];
      if (i >= 2) begin
        int ec;
        logic ev;
        ec = exp_code.pop_front();
        ev = exp_valid.pop_front();
        checks += 2;
        if (code != CW'(ec)) begin failures++; $display("code %0d expected %0d", code, ec); end
        if (valid != ev) begin failures++; $display("valid %b expected %b", valid, ev); end
        if (valid) nvalid++;
      end
    end
    checks++;
    if (nvalid == 0) begin failures++; $display("no hit seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
