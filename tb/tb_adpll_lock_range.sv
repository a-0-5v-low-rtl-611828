// tb_adpll_lock_range: locks the ADPLL (default parameters) at each of the
// output frequencies of its 240-480 MHz locking range that were measured on
// silicon: 240, 320, 400 and 480 MHz, from 15, 20, 25 and 30 MHz references.
// For each, the loop is reset, given 800 reference cycles to acquire, and
// then measured over 200 reference cycles: 16 DCO cycles per reference cycle
// (one edge of tolerance at the window ends), mean frequency within 0.1 MHz
// of 16 x f_ref, and a bounded reference-to-feedback skew. At 400 and
// 480 MHz the loop settles to within a TDC step or two, so the skew must stay
// under 100 ps and the code must be near (f - 220 MHz) / 563 kHz. At 240 and
// 320 MHz the loop's proportional gain per reference cycle,
// Kp * 16 * K_DCO / (f^2 * 20 ps), is 3.9 and 2.2 (above the limit of 2 for
// a sampled loop), so the loop stays frequency-locked but its phase cycles
// by up to about a nanosecond; there the skew bound is 2 ns. It also reports
// the peak-to-peak spread of the DCO period, the model's stand-in for output
// jitter (the model has no noise sources).
module tb_adpll_lock_range;
  timeunit 1ps; timeprecision 1fs;

  logic ref_input = 1'b0, rst_n = 1'b1;
  logic ph1, ph2, divider_out, tdc_sign, dither, dlf_sat;
  logic [8:0] dco_code;
  logic [3:0] dco_frac, tdc_code;
  real  t_ref_ps = 40000.0;
  int   checks = 0, failures = 0;

  adpll_top dut (.*);

  always #(t_ref_ps / 2.0) ref_input = ~ref_input;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int      dco_edges = 0;
  realtime t_fb = 0, t_ph = 0;
  real     p_min = 1.0e9, p_max = 0.0;
  bit      track = 1'b0;
  always @(posedge ph1) begin
    if (track && t_ph > 0) begin
      if ($realtime - t_ph < p_min) p_min = $realtime - t_ph;
      if ($realtime - t_ph > p_max) p_max = $realtime - t_ph;
    end
    t_ph = $realtime;
    dco_edges++;
  end
  always @(posedge divider_out) t_fb = $realtime;

  task automatic run(input real f_ref_mhz, input real skew_lim, input bit tight);
    realtime t0, t1, tr, skew, max_skew;
    int e0, e1;
    real f_out, f_exp, code_exp;
    t_ref_ps = 1.0e6 / f_ref_mhz;
    rst_n = 1'b0;
    repeat (2) @(posedge ref_input);
    rst_n = 1'b1;
    repeat (800) @(posedge ref_input);
    p_min = 1.0e9; p_max = 0.0; track = 1'b1;
    t0 = $realtime; e0 = dco_edges; max_skew = 0;
    repeat (200) begin
      @(posedge ref_input); tr = $realtime;
      #(t_ref_ps / 4.0);
      skew = t_fb - tr;
      if (skew < -t_ref_ps / 2.0) skew = skew + t_ref_ps;
      if (skew < 0) skew = -skew;
      if (skew > max_skew) max_skew = skew;
    end
    @(posedge ref_input); t1 = $realtime; e1 = dco_edges;
    track = 1'b0;
    f_exp = 16.0 * f_ref_mhz;
    f_out = 1.0e6 * real'(e1 - e0) / (t1 - t0);
    code_exp = (f_exp - 220.0) / 0.563;
    $display("f_ref %0.1f MHz: f_out %0.4f MHz, code %0d+%0d/16 (expect ~%0.1f), skew %0.1f ps, period spread %0.2f ps",
             f_ref_mhz, f_out, dco_code, dco_frac, code_exp, max_skew, p_max - p_min);
    check(e1 - e0 >= 16 * 201 - 1 && e1 - e0 <= 16 * 201 + 1, $sformatf("%0.0f MHz: 16 DCO cycles per reference", f_exp));
    check(f_out > f_exp - 0.1 && f_out < f_exp + 0.1, $sformatf("%0.0f MHz: mean output frequency", f_exp));
    check(max_skew < skew_lim, $sformatf("%0.0f MHz: skew", f_exp));
    if (tight)
      check(real'(dco_code) > code_exp - 3.0 && real'(dco_code) < code_exp + 3.0, $sformatf("%0.0f MHz: code", f_exp));
  endtask

  initial begin
    #100;
    run(15.0, 2000.0, 1'b0);
    run(20.0, 2000.0, 1'b0);
    run(25.0, 100.0, 1'b1);
    run(30.0, 100.0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100000.0 * 5000.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
