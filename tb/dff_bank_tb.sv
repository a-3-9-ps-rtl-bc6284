// dff_bank_tb: drives random tap outputs and checks that the bank samples them
// at the clock edge, sum output O_j into bit 2j and carry output CO_j into bit
// 2j+1, and holds them between edges.
module dff_bank_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int TAPS = 12;
  logic clk = 1'b0;
  logic [TAPS-1:0] o, co, o_s, co_s;
  logic [2*TAPS-1:0] raw;
  int checks = 0, failures = 0;

  dff_bank #(.TAPS(TAPS)) dut (.clk, .o, .co, .raw);

  always #1000 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    o = '0; co = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      o  = TAPS'($urandom);
      co = TAPS'($urandom);
      o_s = o; co_s = co;
      @(posedge clk);
      #100;
      o = ~o; co = ~co;             // change after the edge: must not show
      #100;
      for (int j = 0; j < TAPS; j++) begin
        checks++;
        if (raw[2*j] != o_s[j] || raw[2*j+1] != co_s[j]) begin
          failures++;
          $display("tap %0d: raw %b%b expected %b%b", j, raw[2*j+1], raw[2*j], co_s[j], o_s[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
