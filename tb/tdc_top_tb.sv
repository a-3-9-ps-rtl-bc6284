// tdc_top_tb: end-to-end test of the two-channel TDC at reduced size
// (32 taps per chain, clock period 140 ps so the chain spans one period,
// 2**10 hits per calibration round), with bubbly chain models whose
// realignment maps are sorted here from the models' delay tables.
//
// Phase 1 feeds both channels random hits until both have finished a
// calibration round. Phase 2 repeats the interval measurement of the
// evaluation: pairs of hits, channel 1 a fixed interval after channel 0, for
// intervals 0, 10, ..., 440 ns, 24 pairs each, and checks that the mean of the
// measured intervals is right and their spread (RMS) is small. Along the way
// it counts each mechanism of the design and fails if one never happened:
// bubbles in the raw samples, hits seen one edge late (before the first
// tap), hits ignored during the launcher's dead time, hits during a table walk,
// table swaps, and samples where a draining edge left ones above a zero.
module tdc_top_tb
  import tdl_delay_pkg::*;
;
  timeunit 1ps; timeprecision 1fs;

  localparam int NCH = 2, TAPS = 32, NB = 2 * TAPS, IW = $clog2(NB);
  localparam int FW = 16, COW = 32, NLOG = 10;
  localparam int TMIN = 3700, TSPAN = 2001, PMIN = 20, PSPAN = 130, SKEW = 6000;
  localparam realtime TCLK = 140.0;
  localparam int NPAIRS = 24;

  function automatic logic [NB*IW-1:0] sorted_map(int seed);
    logic [NB*IW-1:0] m;
    longint unsigned a [NB];
    int rank;
    for (int r = 0; r < NB; r++) a[r] = arrival_fs(r, seed, TMIN, TSPAN, PMIN, PSPAN, SKEW);
    for (int r = 0; r < NB; r++) begin
      rank = 0;
      for (int q = 0; q < NB; q++)
        if (a[q] < a[r] || (a[q] == a[r] && q < r)) rank++;
      m[rank*IW +: IW] = IW'(r);
    end
    return m;
  endfunction

  localparam logic [NCH-1:0][NB*IW-1:0] MAP = {sorted_map(2), sorted_map(1)};

  logic clk = 1'b0, rst = 1'b0;
  logic [NCH-1:0] hit = '0;
  logic [NCH-1:0][COW+FW-1:0] ts;
  logic [NCH-1:0][COW-1:0] ts_coarse;
  logic [NCH-1:0][FW-1:0] ts_fine;
  logic [NCH-1:0] ts_valid, cal_updating, busy;
  logic [NCH-1:0][15:0] cal_rounds;
  int checks = 0, failures = 0;

  tdc_top #(
    .NCH(NCH), .TAPS(TAPS), .FINE_W(FW), .COARSE_W(COW), .NLOG(NLOG),
    .CUSTOM_MAP(1'b1), .MAP(MAP), .XOR_PCT_MIN(PMIN), .XOR_PCT_SPAN(PSPAN),
    .SKEW_MAX_FS(SKEW)
  ) dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_bubble = 0, n_late = 0, n_dead = 0, n_walk_hit = 0, n_swap = 0, n_drain = 0;
  bit armed = 0;
  logic [NCH-1:0] upd_q = '0;

  always @(posedge clk) begin
    logic [NB-1:0] rising, th;
    rising = dut.g_ch[0].u_ch.raw ^ {TAPS{2'b01}};
    for (int r = 1; r < NB; r++)
      if (rising[r] && !rising[r-1]) begin n_bubble++; break; end
    th = dut.g_ch[0].u_ch.therm;
    if (!th[0] && th != '0) n_drain++;
    if (armed) begin
      for (int c = 0; c < NCH; c++) begin
        if (upd_q[c] && !cal_updating[c]) n_swap++;
        if (cal_updating[c] && ts_valid[c]) n_walk_hit++;
      end
    end
    upd_q <= cal_updating;
  end

  // ---- timestamps per channel ----
  longint ts_q [NCH][$];
  always @(posedge clk) begin
    if (armed)
      for (int c = 0; c < NCH; c++)
        if (ts_valid[c]) ts_q[c].push_back(longint'(ts[c]));
  end

  // ---- hit generation ----
  int n_hits [NCH];

  task automatic fire(input int c);
    hit[c] = 1'b1;
    n_hits[c]++;
    fork begin #30; hit[c] = 1'b0; end join_none
  endtask

  // first-tap check: the earliest bit of channel c, fs
  function automatic bit before_first_tap(int c, realtime th);
    realtime te;
    longint unsigned amin;
    te = real'(longint'($floor(th / TCLK - 0.5)) + 1) * TCLK + TCLK / 2;
    while (te <= th) te += TCLK;
    amin = arrival_fs(MAP[c][IW-1:0], c + 1, TMIN, TSPAN, PMIN, PSPAN, SKEW);
    return longint'((te - th) * 1000.0) <= longint'(amin);
  endfunction

  real ps_per_lsb;

  initial begin
    real sum, sq, meas, mean, rms, worst_rms, worst_mean;
    int npt;
    ps_per_lsb = TCLK / real'(1 << FW);
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    fire(0); fire(1);                      // prime both chains
    repeat (NB + 10) @(posedge clk);
    for (int c = 0; c < NCH; c++) ts_q[c].delete();
    n_hits[0] = 0; n_hits[1] = 0;
    armed = 1;

    // Phase 1: random hits on both channels until both are calibrated.
    while (cal_rounds[0] < 1 || cal_rounds[1] < 1) begin
      @(posedge clk);
      for (int c = 0; c < NCH; c++)
        if (!busy[c] && $urandom_range(0, 2) == 0) begin
          realtime d;
          d = real'($urandom_range(1, 139_000)) / 1000.0;
          fork
            automatic int cc = c;
            automatic realtime dd = d;
            begin
              #(dd);
              if (before_first_tap(cc, $realtime)) n_late++;
              fire(cc);
            end
          join_none
        end
    end
    repeat (20) @(posedge clk);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (ts_q[c].size() != n_hits[c]) begin
        failures++;
        $display("channel %0d: %0d timestamps for %0d hits", c, ts_q[c].size(), n_hits[c]);
      end
      ts_q[c].delete();
      n_hits[c] = 0;
    end

    // Phase 2: interval sweep 0 .. 440 ns.
    worst_rms = 0.0; worst_mean = 0.0; npt = 0;
    for (int iv = 0; iv <= 440; iv += 10) begin
      realtime ivl;
      ivl = real'(iv) * 1000.0 + real'($urandom_range(0, 999)) / 10.0;
      sum = 0.0; sq = 0.0;
      for (int p = 0; p < NPAIRS; p++) begin
        realtime t0;
        wait (!busy[0] && !busy[1]);
        @(posedge clk);
        #(real'($urandom_range(1, 139_000)) / 1000.0);
        t0 = $realtime;
        fire(0);
        if (p % 4 == 1) begin
          // a second hit during channel 0's dead time must be ignored
          fork begin #(TCLK * 3.5); hit[0] = 1'b1; #20; hit[0] = 1'b0; n_dead++; end join_none
        end
        #(ivl);
        fire(1);
        repeat (12) @(posedge clk);
        checks++;
        if (ts_q[0].size() != 1 || ts_q[1].size() != 1) begin
          failures++;
          $display("interval %0d ns pair %0d: %0d/%0d timestamps", iv, p,
                   ts_q[0].size(), ts_q[1].size());
          ts_q[0].delete(); ts_q[1].delete();
        end else begin
          meas = real'(ts_q[1].pop_front() - ts_q[0].pop_front()) * ps_per_lsb;
          sum += meas - ivl;
          sq += (meas - ivl) ** 2;
        end
      end
      mean = sum / NPAIRS;
      rms = $sqrt(sq / NPAIRS - mean * mean);
      if (rms > worst_rms) worst_rms = rms;
      if (((mean < 0.0) ? -mean : mean) > worst_mean) worst_mean = ((mean < 0.0) ? -mean : mean);
      npt++;
      checks += 2;
      if (rms > 4.0) begin failures++; $display("interval %0d ns: rms %0.2f ps", iv, rms); end
      if (((mean < 0.0) ? -mean : mean) > 6.0) begin failures++; $display("interval %0d ns: mean error %0.2f ps", iv, mean); end
      if (iv % 110 == 0)
        $display("interval %0d ns: mean error %0.2f ps, rms %0.2f ps", iv, mean, rms);
    end
    $display("interval sweep: %0d points, worst rms %0.2f ps, worst mean error %0.2f ps",
             npt, worst_rms, worst_mean);
    $display("mechanisms: bubbly samples %0d, late hits %0d, dead-time hits %0d, hits during walk %0d, table swaps %0d, draining samples %0d",
             n_bubble, n_late, n_dead, n_walk_hit, n_swap, n_drain);
    checks += 6;
    if (n_bubble == 0)   begin failures++; $display("no bubbles seen"); end
    if (n_late == 0)     begin failures++; $display("no hit before the first tap"); end
    if (n_dead == 0)     begin failures++; $display("no dead-time hit"); end
    if (n_walk_hit == 0) begin failures++; $display("no hit during a table walk"); end
    if (n_swap < 2)      begin failures++; $display("too few table swaps"); end
    if (n_drain == 0)    begin failures++; $display("no draining sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
