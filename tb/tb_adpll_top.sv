// tb_adpll_top: end-to-end test of the ADPLL at its default parameters.
//
// Phase 1 drives a 25 MHz reference, releases reset and lets the loop
// acquire lock. It then measures, independently of the design, the DCO edge
// count per reference period (16), the mean DCO period (2500 ps = 400 MHz)
// and the worst reference-to-feedback edge skew (a few 20 ps TDC steps).
// Phase 2 raises the reference to 35 MHz, whose 560 MHz target lies above the
// DCO's range, so the loop filter must clamp at its top code. Phase 3 returns
// to 25 MHz and checks that the loop locks again. The loop's mechanisms are
// counted throughout: reference-leads and feedback-leads decisions, TDC
// saturation, loop-filter clamping, SDM dither pulses and carries into the
// sixteenth fine line; a mechanism that never happened counts as a failure.
module tb_adpll_top;
  timeunit 1ps; timeprecision 1fs;

  localparam int LOCK_CYCLES = 600;   // reference cycles allowed for acquisition
  localparam int MEAS_CYCLES = 200;   // reference cycles measured after lock

  logic ref_input = 1'b0, rst_n = 1'b1;
  logic ph1, ph2, divider_out, tdc_sign, dither, dlf_sat;
  logic [8:0] dco_code;
  logic [3:0] dco_frac, tdc_code;
  real  t_ref_ps = 40000.0;           // 25 MHz

  int checks = 0, failures = 0;
  int n_ref_lead = 0, n_fb_lead = 0, n_tdc_sat = 0, n_dither = 0, n_dlf_sat = 0, n_t16 = 0;

  adpll_top dut (.*);

  always #(t_ref_ps / 2.0) ref_input = ~ref_input;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  always @(negedge ref_input) if (rst_n) begin
    if (tdc_sign) n_ref_lead++; else n_fb_lead++;
    if (tdc_code == 4'd15) n_tdc_sat++;
  end
  always @(posedge ref_input) if (rst_n && dlf_sat) n_dlf_sat++;
  always @(posedge ph1) if (rst_n) begin
    if (dither) n_dither++;
    if (dut.fine_therm[15]) n_t16++;
  end

  int      dco_edges = 0;
  realtime t_fb = 0;
  always @(posedge ph1) dco_edges++;
  always @(posedge divider_out) t_fb = $realtime;

  // Measure over MEAS_CYCLES reference periods; the feedback edge nearest
  // each reference edge gives the skew.
  task automatic measure(input real f_expect_mhz, input string tag);
    realtime t0, t1, tr, skew, max_skew;
    int e0, e1;
    real period_ps;
    @(posedge ref_input); t0 = $realtime; e0 = dco_edges;
    max_skew = 0;
    repeat (MEAS_CYCLES) begin
      @(posedge ref_input); tr = $realtime;
      #(t_ref_ps / 4.0);
      skew = t_fb - tr;
      if (skew < -t_ref_ps / 2.0) skew = skew + t_ref_ps;  // edge came just before
      if (skew < 0) skew = -skew;
      if (skew > max_skew) max_skew = skew;
    end
    @(posedge ref_input); t1 = $realtime; e1 = dco_edges;
    period_ps = (t1 - t0) / real'(e1 - e0);
    $display("%s: %0d DCO edges in %0d ref cycles, mean %0.3f MHz, code %0d+%0d/16, max skew %0.1f ps",
             tag, e1 - e0, MEAS_CYCLES + 1, 1.0e6 / period_ps, dco_code, dco_frac, max_skew);
    check((e1 - e0) >= 16 * (MEAS_CYCLES + 1) - 1 && (e1 - e0) <= 16 * (MEAS_CYCLES + 1) + 1,
          {tag, ": 16 DCO cycles per reference cycle"});
    check(1.0e6 / period_ps > f_expect_mhz - 0.05 && 1.0e6 / period_ps < f_expect_mhz + 0.05,
          {tag, ": mean DCO frequency"});
    check(max_skew < 100.0, {tag, ": feedback edge within 100 ps of the reference edge"});
  endtask

  initial begin
    #100 rst_n = 1'b0;
    repeat (3) @(posedge ref_input);
    #1000 rst_n = 1'b1;
    // phase 1: acquire and hold 400 MHz
    repeat (LOCK_CYCLES) @(posedge ref_input);
    measure(400.0, "lock 400 MHz");
    check(dco_code > 9'd300 && dco_code < 9'd330, "locked code matches (400-220)/0.563 = 319.7");
    // phase 2: unreachable 560 MHz target drives the filter into its clamp
    t_ref_ps = 1.0e6 / 35.0;
    repeat (400) @(posedge ref_input);
    $display("over-range: code %0d, clamp cycles %0d", dco_code, n_dlf_sat);
    check(dco_code == 9'd511, "code pinned at the top of the range");
    check(n_dlf_sat > 0, "loop filter clamp seen");
    // phase 3: back to 25 MHz, relock
    t_ref_ps = 40000.0;
    repeat (LOCK_CYCLES) @(posedge ref_input);
    measure(400.0, "relock 400 MHz");
    $display("mechanisms: ref_lead=%0d fb_lead=%0d tdc_sat=%0d dither=%0d t16=%0d dlf_sat=%0d",
             n_ref_lead, n_fb_lead, n_tdc_sat, n_dither, n_t16, n_dlf_sat);
    check(n_ref_lead > 0, "reference-leads decision seen");
    check(n_fb_lead > 0, "feedback-leads decision seen");
    check(n_tdc_sat > 0, "TDC saturation seen");
    check(n_dither > 0, "SDM dither pulse seen");
    check(n_t16 > 0, "fine line T16 driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40000.0 * 5000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
