// tdc_top_full_tb: the two-channel TDC at its default size (430 taps,
// 860 sampled bits per channel, 500 MHz clock, 2**16 hits per calibration
// round) with the default, bubble-free chain models.
//
// After reset the calibration block fills its start table (equal bins of
// Tclk/860). Both channels then get NHITS random hits; for every channel-0
// hit the code is checked against the number of bits the edge has passed,
// worked out here from the delay tables, and every hit must yield one
// timestamp. Then pairs of hits 10 ns apart, as in the evaluation, check the
// interval measured with the start table: with the model's 4.7 ps mean tap
// delay the equal-bin guess is off by at most some tens of ps. A full
// calibration round (2**16 hits per channel) is too long to simulate at this
// size; tdc_top_tb covers it at reduced size.
module tdc_top_full_tb
  import tdl_delay_pkg::*;
;
  timeunit 1ps; timeprecision 1fs;

  localparam int TAPS = 430, NB = 2 * TAPS, CW = $clog2(NB + 1), FW = 16;
  localparam realtime TCLK = 2000.0;
  localparam int NPAIRS = 20, NHITS = 40;

  logic clk = 1'b0, rst = 1'b0;
  logic [1:0] hit = '0;
  logic [1:0][47:0] ts;
  logic [1:0][31:0] ts_coarse;
  logic [1:0][15:0] ts_fine;
  logic [1:0] ts_valid, cal_updating, busy;
  logic [1:0][15:0] cal_rounds;
  int checks = 0, failures = 0;

  tdc_top dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #3_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned a0 [NB];   // arrival times of channel 0's bits, fs
  int exp_code [$];
  bit armed = 0;
  int code_checks = 0, code_fail = 0;

  always @(posedge clk) begin
    if (armed && dut.g_ch[0].u_ch.code_valid) begin
      int ec;
      ec = exp_code.pop_front();
      code_checks++;
      if (ec >= 0 && dut.g_ch[0].u_ch.code != CW'(ec)) begin
        code_fail++;
        if (code_fail < 10) $display("code %0d expected %0d", dut.g_ch[0].u_ch.code, ec);
      end
    end
  end

  longint ts_q [2][$];
  int n_ts [2];
  always @(posedge clk)
    if (armed)
      for (int c = 0; c < 2; c++)
        if (ts_valid[c]) begin ts_q[c].push_back(longint'(ts[c])); n_ts[c]++; end

  int n_hits [2];

  function automatic int expected_code(realtime th);
    realtime te;
    longint dfs;
    int c;
    te = real'(longint'($floor(th / TCLK - 0.5)) + 1) * TCLK + TCLK / 2;
    while (te <= th) te += TCLK;
    dfs = longint'((te - th) * 1000.0 + 0.5);
    c = 0;
    for (int r = 0; r < NB; r++) if (a0[r] < dfs) c++;
    if (c == 0) begin
      dfs += longint'(TCLK * 1000.0 + 0.5);
      for (int r = 0; r < NB; r++) if (a0[r] < dfs) c++;
    end
    for (int r = 0; r < NB; r++)
      if (a0[r] + 2 >= dfs && a0[r] <= dfs + 2) c = -1;
    return c;
  endfunction

  task automatic fire(input int c);
    if (c == 0) exp_code.push_back(expected_code($realtime));
    hit[c] = 1'b1;
    n_hits[c]++;
    fork begin #300; hit[c] = 1'b0; end join_none
  endtask

  initial begin
    longint unsigned t;
    real sum, sq, meas, mean, rms, ivl, worst;
    t = 0;
    for (int j = 0; j < TAPS; j++) begin
      a0[2*j]   = t + xor_fs(j, 1, 3700, 2001, 20, 61);
      a0[2*j+1] = t + tap_fs(j, 1, 3700, 2001);
      t += tap_fs(j, 1, 3700, 2001);
    end
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    hit = 2'b11; #300 hit = 2'b00;           // prime both chains
    repeat (NB + 10) @(posedge clk);
    exp_code.delete();
    n_hits[0] = 0; n_hits[1] = 0; n_ts[0] = 0; n_ts[1] = 0;
    armed = 1;

    while (n_hits[0] < NHITS || n_hits[1] < NHITS) begin
      @(posedge clk);
      for (int c = 0; c < 2; c++)
        if (!busy[c]) begin
          fork
            automatic int cc = c;
            automatic realtime dd = real'($urandom_range(1, 1_999_000)) / 1000.0;
            begin #(dd); fire(cc); end
          join_none
        end
    end
    repeat (20) @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      checks++;
      if (n_ts[c] != n_hits[c]) begin
        failures++; $display("channel %0d: %0d timestamps for %0d hits", c, n_ts[c], n_hits[c]);
      end
      ts_q[c].delete();
    end
    checks++;
    if (code_fail != 0 || code_checks != n_hits[0]) begin
      failures++; $display("codes: %0d checked, %0d wrong, %0d hits", code_checks, code_fail, n_hits[0]);
    end

    // calibrated interval measurement, 10 ns apart as in the evaluation
    sum = 0.0; sq = 0.0; worst = 0.0;
    for (int p = 0; p < NPAIRS; p++) begin
      wait (!busy[0] && !busy[1]);
      @(posedge clk);
      #(real'($urandom_range(1, 1_999_000)) / 1000.0);
      ivl = 10_000.0 + real'($urandom_range(0, 1999)) / 10.0;
      fire(0);
      #(ivl);
      fire(1);
      repeat (12) @(posedge clk);
      checks++;
      if (ts_q[0].size() != 1 || ts_q[1].size() != 1) begin
        failures++; $display("pair %0d lost", p);
        ts_q[0].delete(); ts_q[1].delete();
      end else begin
        meas = real'(ts_q[1].pop_front() - ts_q[0].pop_front()) * TCLK / 65536.0;
        sum += meas - ivl;
        sq += (meas - ivl) ** 2;
        if (meas - ivl > worst) worst = meas - ivl;
        if (ivl - meas > worst) worst = ivl - meas;
      end
    end
    mean = sum / NPAIRS;
    rms = $sqrt(sq / NPAIRS - mean * mean);
    $display("hits per channel %0d, codes checked %0d, interval rms %0.2f ps, mean error %0.2f ps, worst %0.2f ps",
             n_hits[0], code_checks, rms, mean, worst);
    checks += 2;
    if (cal_rounds[0] != 0 || cal_rounds[1] != 0) begin failures++; $display("unexpected calibration round"); end
    if (worst > 40.0) begin failures++; $display("interval error too large for the start table"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
