// tdc_channel_tb: one channel with a short chain (32 taps, 64 sampled bits)
// whose model has large delay spread and clock skew, so the raw samples carry
// bubbles. The realignment map is the arrival order of the 64 bits, sorted
// here from the model's delay tables (what a code density scan of each bit
// measures on hardware). The clock period is shortened to fit the chain.
// For every hit at a random time it checks:
//  * the code equals the number of bits whose arrival time is shorter than
//    the time from the hit to the next clock edge (worked out here from the
//    delay tables, not from the pipeline);
//  * after the first calibration round, the fine time matches that hit-to-edge
//    time to within the widest bin plus a margin, and the timestamps' RMS
//    error is small;
//  * the coarse part equals the cycle count of the sampling edge;
//  * raw samples with bubbles occurred and calibration rounds completed.
module tdc_channel_tb
  import tdl_delay_pkg::*;
;
  timeunit 1ps; timeprecision 1fs;

  localparam int TAPS = 32, NB = 2 * TAPS, IW = $clog2(NB), CW = $clog2(NB + 1);
  localparam int FW = 16, COW = 32, NLOG = 10, SEED = 1;
  localparam int TMIN = 3700, TSPAN = 2001, PMIN = 20, PSPAN = 130, SKEW = 6000;
  localparam realtime TCLK = 140.0;

  function automatic longint unsigned arr(int r);
    return arrival_fs(r, SEED, TMIN, TSPAN, PMIN, PSPAN, SKEW);
  endfunction

  function automatic logic [NB*IW-1:0] sorted_map();
    logic [NB*IW-1:0] m;
    longint unsigned a [NB];
    int rank;
    for (int r = 0; r < NB; r++) a[r] = arr(r);
    for (int r = 0; r < NB; r++) begin
      rank = 0;
      for (int q = 0; q < NB; q++)
        if (a[q] < a[r] || (a[q] == a[r] && q < r)) rank++;
      m[rank*IW +: IW] = IW'(r);
    end
    return m;
  endfunction

  localparam logic [NB*IW-1:0] MAP = sorted_map();

  logic clk = 1'b0, rst = 1'b0, hit = 1'b0;
  logic [COW-1:0] count;
  logic [COW+FW-1:0] ts;
  logic [COW-1:0] ts_coarse;
  logic [FW-1:0] ts_fine;
  logic ts_valid, cal_updating, busy;
  logic [15:0] cal_rounds;
  int checks = 0, failures = 0;

  coarse_counter #(.WIDTH(COW)) u_cnt (.clk, .rst, .count);

  tdc_channel #(
    .TAPS(TAPS), .FINE_W(FW), .COARSE_W(COW), .NLOG(NLOG), .CUSTOM_MAP(1'b1),
    .MAP(MAP), .SEED(SEED), .XOR_PCT_MIN(PMIN), .XOR_PCT_SPAN(PSPAN),
    .SKEW_MAX_FS(SKEW)
  ) dut (
    .hit, .clk, .rst, .count, .ts, .ts_coarse, .ts_fine, .ts_valid,
    .cal_rounds, .cal_updating, .busy
  );

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Edge count: incremented at every rising edge, so it matches `count`
  // up to a constant.
  longint edges = 0;
  always @(posedge clk) edges++;

  // Raw samples with a bubble: a bit that has not switched below one that has.
  int bubbles = 0;
  always @(posedge clk) begin
    logic [NB-1:0] rising;
    logic [NB-1:0] raw_s;
    raw_s = dut.raw;
    rising = raw_s ^ {TAPS{2'b01}};
    for (int r = 1; r < NB; r++)
      if (rising[r] && !rising[r-1]) begin bubbles++; break; end
  end

  bit armed = 0;   // set once the priming hit has left the pipeline

  // Expected results, in hit order.
  int exp_code [$];
  longint exp_delta [$];   // hit to sampling edge, fs
  longint exp_edge [$];
  int maxgap_fs;

  always @(posedge clk) begin
    if (armed && dut.code_valid) begin
      int ec;
      ec = exp_code.pop_front();
      checks++;
      if (ec >= 0 && dut.code != CW'(ec)) begin
        failures++;
        $display("%0t: code %0d expected %0d", $realtime, dut.code, ec);
      end
    end
  end

  real err_sum = 0.0, err_sq = 0.0;
  int nerr = 0;
  longint coarse_off;
  bit coarse_off_set = 0;
  int cal_checked = 0;
  real errs [$];

  always @(posedge clk) begin
    if (armed && ts_valid) begin
      longint d, e;
      real fine_ps, err;
      d = exp_delta.pop_front();
      e = exp_edge.pop_front();
      if (!coarse_off_set) begin coarse_off = longint'(ts_coarse) - e; coarse_off_set = 1; end
      checks++;
      if (longint'(ts_coarse) - e != coarse_off) begin
        failures++; $display("coarse %0d does not track the sampling edge", ts_coarse);
      end
      if (ts != {ts_coarse, FW'(0)} - (COW+FW)'(ts_fine)) begin
        failures++; $display("ts not coarse*2^FW - fine");
      end
      if (cal_rounds >= 1 && !cal_updating) begin
        fine_ps = real'(ts_fine) * TCLK / real'(1 << FW);
        err = fine_ps - real'(d) / 1000.0;
        errs.push_back(err);
      end
    end
  end

  initial begin
    realtime th, te;
    longint dfs, edge_n;
    int late_hits;
    int c, hits;
    longint unsigned a [NB];
    longint unsigned srt [NB];
    real mean, rms, worst;

    for (int r = 0; r < NB; r++) a[r] = arr(r);
    // widest bin: largest gap between consecutive arrival times
    for (int k = 0; k < NB; k++) srt[MAP[k*IW +: IW]] = 0;
    maxgap_fs = 0;
    for (int k = 1; k < NB; k++) begin
      longint g;
      g = longint'(a[MAP[k*IW +: IW]]) - longint'(a[MAP[(k-1)*IW +: IW]]);
      if (g < 0) begin failures++; $display("map not sorted at %0d", k); end
      if (g > maxgap_fs) maxgap_fs = int'(g);
    end

    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // prime the chain once (its outputs start in an unknown state)
    hit = 1'b1; #20 hit = 1'b0;
    repeat (NB + 10) @(posedge clk);
    exp_code.delete(); exp_delta.delete(); exp_edge.delete();
    armed = 1;

    hits = 0;
    late_hits = 0;
    while (cal_rounds < 2 || hits < 2500) begin
      @(posedge clk);
      #(real'($urandom_range(1, 139_999)) / 1000.0);
      th = $realtime;
      hit = 1'b1;
      // first rising edge after the hit
      te = real'(longint'($floor(th / TCLK - 0.5)) + 1) * TCLK + TCLK / 2;
      while (te <= th) te += TCLK;
      edge_n = edges + 1;
      dfs = longint'((te - th) * 1000.0 + 0.5);
      c = 0;
      for (int r = 0; r < NB; r++) if (a[r] < dfs) c++;
      if (c == 0) begin
        // no bit has switched yet: the hit is seen one edge later
        dfs += longint'(TCLK * 1000.0 + 0.5);
        edge_n++;
        for (int r = 0; r < NB; r++) if (a[r] < dfs) c++;
        late_hits++;
      end
      for (int r = 0; r < NB; r++)
        if (a[r] + 2 >= dfs && a[r] <= dfs + 2) c = -1;   // too close to call
      exp_code.push_back(c);
      exp_delta.push_back(dfs);
      exp_edge.push_back(edge_n);
      #30 hit = 1'b0;
      hits++;
      wait (!busy);
      @(posedge clk);
    end
    repeat (10) @(posedge clk);

    checks++;
    if (exp_code.size() != 0) begin failures++; $display("%0d hits lost", exp_code.size()); end
    checks++;
    if (late_hits == 0) begin failures++; $display("no hit fell before the first tap"); end
    checks++;
    if (bubbles == 0) begin failures++; $display("no raw sample had a bubble"); end
    mean = 0.0; rms = 0.0; worst = 0.0;
    foreach (errs[i]) mean += errs[i];
    mean /= real'(errs.size());
    foreach (errs[i]) begin
      rms += (errs[i] - mean) ** 2;
      if ((errs[i] - mean) > worst) worst = errs[i] - mean;
      if ((mean - errs[i]) > worst) worst = mean - errs[i];
    end
    rms = $sqrt(rms / real'(errs.size()));
    $display("hits %0d, calibrated %0d, rounds %0d, bubbly samples %0d, widest bin %0.2f ps",
             hits, errs.size(), cal_rounds, bubbles, real'(maxgap_fs) / 1000.0);
    $display("fine time error after calibration: offset %0.2f ps, rms %0.2f ps, worst %0.2f ps",
             mean, rms, worst);
    checks += 3;
    if (errs.size() < 100) begin failures++; $display("too few calibrated hits"); end
    if (rms > 3.0) begin failures++; $display("rms error too large"); end
    if (worst > real'(maxgap_fs) / 1000.0 + 6.0) begin failures++; $display("worst error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
