// timestamp_out_tb: checks ts = (count - LAT) * 2**FINE_W - fine, the split
// coarse and fine parts, and that ts_valid follows fine_valid by one cycle.
module timestamp_out_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int CW = 12, FW = 8, LAT = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [CW-1:0] count;
  logic [FW-1:0] fine;
  logic fine_valid;
  logic [CW+FW-1:0] ts;
  logic [CW-1:0] ts_coarse;
  logic [FW-1:0] ts_fine;
  logic ts_valid;
  int checks = 0, failures = 0;

  timestamp_out #(.COARSE_W(CW), .FINE_W(FW), .LAT(LAT)) dut (
    .clk, .rst, .count, .fine, .fine_valid, .ts, .ts_coarse, .ts_fine, .ts_valid);

  always #1000 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_ts;
    int c, f;
    count = '0; fine = '0; fine_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      c = $urandom_range(0, (1 << CW) - 1);
      f = $urandom_range(0, (1 << FW) - 1);
      count = CW'(c); fine = FW'(f);
      fine_valid = 1'($urandom_range(0, 1));
      @(posedge clk);
      #1 checks++;
      if (ts_valid != fine_valid) begin failures++; $display("ts_valid wrong"); end
      if (fine_valid) begin
        exp_ts = ((longint'((c - LAT) & ((1 << CW) - 1)) << FW) - f) & ((longint'(1) << (CW + FW)) - 1);
        checks += 3;
        if (ts != (CW+FW)'(exp_ts)) begin failures++; $display("ts %0d expected %0d", ts, exp_ts); end
        if (ts_coarse != CW'(c - LAT)) begin failures++; $display("coarse wrong"); end
        if (ts_fine != FW'(f)) begin failures++; $display("fine wrong"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
