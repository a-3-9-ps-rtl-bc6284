// online_calib_tb: drives codes with a skewed, known distribution and checks
// the calibration against a reference model kept in the testbench:
//  * before the first round the table is the linear guess (code c at the
//    centre of c equal bins);
//  * after each round of 2**NLOG counted hits, every code maps to
//    (2*sum_{i<c} h(i) + h(c)) * 2**FINE_W / 2**(NLOG+1), from the testbench's
//    own histogram;
//  * hits during the table walk are looked up but not counted;
//  * fine_valid follows valid by one cycle.
module online_calib_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int NB = 20, CW = $clog2(NB + 1), FW = 12, NLOG = 8;
  localparam int NC = NB + 1;
  localparam longint STEP_Q8 = (longint'(1) << (FW + 8)) / NB;

  logic clk = 1'b0, rst = 1'b1;
  logic [CW-1:0] code;
  logic valid, fine_valid, updating;
  logic [FW-1:0] fine;
  logic [15:0] rounds;
  int checks = 0, failures = 0;
  int hist_ref [NC];
  int table_ref [NC];
  int counted;
  int walk_hits = 0;

  online_calib #(.NBITS(NB), .CODE_W(CW), .FINE_W(FW), .NLOG(NLOG)) dut (
    .clk, .rst, .code, .valid, .fine, .fine_valid, .rounds, .updating);

  always #1000 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A code distribution with unequal bins: code c has weight 1 + (c*7 mod 5).
  function automatic int draw_code();
    int w, r, acc;
    w = 0;
    for (int c = 1; c <= NB; c++) w += 1 + (c * 7) % 5;
    r = $urandom_range(0, w - 1);
    acc = 0;
    for (int c = 1; c <= NB; c++) begin
      acc += 1 + (c * 7) % 5;
      if (r < acc) return c;
    end
    return NB;
  endfunction

  task automatic lookup_check(input int c, input int expected, input string what);
    @(negedge clk);
    code = CW'(c); valid = 1'b1;
    @(posedge clk);
    #1 checks += 2;
    if (!fine_valid) begin failures++; $display("%s: fine_valid low", what); end
    if (fine != FW'(expected)) begin
      failures++;
      $display("%s: code %0d fine %0d expected %0d", what, c, fine, expected);
    end
  endtask

  task automatic build_ref();
    longint cum;
    cum = 0;
    for (int c = 0; c < NC; c++) begin
      longint v;
      v = ((2 * cum + hist_ref[c]) << FW) >> (NLOG + 1);
      table_ref[c] = (v >= (1 << FW)) ? (1 << FW) - 1 : int'(v);
      cum += hist_ref[c];
    end
  endtask

  initial begin
    int c;
    code = '0; valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (NC + 2) @(posedge clk);

    // linear start table; these look-ups are counted as hits of round 1
    foreach (hist_ref[i]) hist_ref[i] = 0;
    counted = 0;
    for (int cc = 1; cc <= NB; cc++) begin
      longint lin;
      lin = longint'(cc) * STEP_Q8;
      lin = (lin < STEP_Q8 / 2) ? 0 : (lin - STEP_Q8 / 2) >> 8;
      lookup_check(cc, int'(lin), "linear table");
      hist_ref[cc]++;
      counted++;
    end

    for (int round = 1; round <= 3; round++) begin
      while (counted < (1 << NLOG)) begin
        @(negedge clk);
        c = draw_code();
        code = CW'(c);
        valid = ($urandom_range(0, 3) != 0);
        if (valid) begin hist_ref[c]++; counted++; end
      end
      build_ref();
      // during the walk: look up (old table) but do not count
      @(negedge clk);
      valid = 1'b0;
      @(posedge clk);
      #1 checks++;
      if (!updating) begin failures++; $display("round %0d: no table walk", round); end
      while (updating) begin
        @(negedge clk);
        code = CW'(draw_code());
        valid = 1'b1;
        walk_hits++;
        @(posedge clk);
        #1;
      end
      @(negedge clk);
      valid = 1'b0;
      checks++;
      if (rounds != 16'(round)) begin failures++; $display("rounds %0d expected %0d", rounds, round); end
      foreach (hist_ref[i]) hist_ref[i] = 0;
      counted = 0;
      for (int cc = 0; cc < NC; cc++) begin
        lookup_check(cc, table_ref[cc], $sformatf("round %0d", round));
        hist_ref[cc]++;
        counted++;
      end
    end
    checks++;
    if (walk_hits == 0) begin failures++; $display("no hit during a table walk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
