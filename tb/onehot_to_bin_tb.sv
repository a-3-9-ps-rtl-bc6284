// onehot_to_bin_tb: every one-hot position k must encode to k+1, an all-zero
// input to 0, and the hit flag must come out as valid in the same cycle.
module onehot_to_bin_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int NB = 40;
  localparam int CW = $clog2(NB + 1);
  logic clk = 1'b0, rst = 1'b1;
  logic [NB-1:0] onehot;
  logic hit, valid;
  logic [CW-1:0] code;
  int checks = 0, failures = 0;

  onehot_to_bin #(.NBITS(NB)) dut (.clk, .rst, .onehot, .hit, .code, .valid);

  always #1000 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_code;
    logic exp_valid;
    onehot = '0; hit = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = -1; k < NB; k++) begin
      @(negedge clk);
      onehot = '0;
      if (k >= 0) onehot[k] = 1'b1;
      hit = 1'($urandom_range(0, 1));
      exp_code = k + 1;
      exp_valid = hit;
      @(posedge clk);
      #1 checks += 2;
      if (code != CW'(exp_code)) begin
        failures++; $display("position %0d: code %0d expected %0d", k, code, exp_code);
      end
      if (valid != exp_valid) begin failures++; $display("position %0d: valid wrong", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
