// carry_chain_tdl_tb: launches a step into a short chain with bubbles enabled
// and checks that every output of every tap changes at the time given by the
// delay tables (O_j falls, CO_j rises), then that the falling step clears
// them all again.
module carry_chain_tdl_tb
  import tdl_delay_pkg::*;
;
  timeunit 1ps; timeprecision 1fs;

  localparam int TAPS = 24, SEED = 5;
  localparam int TMIN = 3700, TSPAN = 2001, PMIN = 20, PSPAN = 130, SKEW = 6000;
  logic launch = 1'b0;
  logic [TAPS-1:0] o, co;
  int checks = 0, failures = 0;

  carry_chain_tdl #(
    .TAPS(TAPS), .SEED(SEED), .TAP_MIN_FS(TMIN), .TAP_SPAN_FS(TSPAN),
    .XOR_PCT_MIN(PMIN), .XOR_PCT_SPAN(PSPAN), .SKEW_MAX_FS(SKEW)
  ) dut (.launch, .o, .co);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t0;
  realtime arrive [2*TAPS];
  realtime latest;
  int order_breaks;

  initial begin
    // one full step up and down puts every delayed output in a known state
    launch = 1'b1;
    #400;
    launch = 1'b0;
    #400;
    checks++;
    if (o != '1 || co != '0) begin failures++; $display("idle state wrong"); end
    latest = 0;
    order_breaks = 0;
    for (int r = 0; r < 2 * TAPS; r++) begin
      arrive[r] = real'(arrival_fs(r, SEED, TMIN, TSPAN, PMIN, PSPAN, SKEW)) / 1000.0;
      if (arrive[r] > latest) latest = arrive[r];
      if (r > 0 && arrive[r] < arrive[r-1]) order_breaks++;
    end
    t0 = $realtime;
    launch = 1'b1;
    // sample each bit just before and just after its predicted change
    for (int r = 0; r < 2 * TAPS; r++) begin
      fork
        automatic int rr = r;
        begin
          logic v_pre, v_post;
          #(arrive[rr] - 0.002);
          v_pre = (rr % 2 == 0) ? ~o[rr/2] : co[rr/2];
          #0.004;
          v_post = (rr % 2 == 0) ? ~o[rr/2] : co[rr/2];
          checks++;
          if (v_pre !== 1'b0 || v_post !== 1'b1) begin
            failures++;
            $display("bit %0d: before %b after %b at %0.3f ps", rr, v_pre, v_post, arrive[rr]);
          end
        end
      join_none
    end
    #(latest + 1.0);
    checks++;
    if (o != '0 || co != '1) begin failures++; $display("chain not fully passed"); end
    checks++;
    if (order_breaks == 0) begin failures++; $display("model produced no bubbles"); end
    launch = 1'b0;
    #(latest + 1.0);
    checks++;
    if (o != '1 || co != '0) begin failures++; $display("chain did not drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
