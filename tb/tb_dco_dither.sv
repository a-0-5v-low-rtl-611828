// tb_dco_dither: the DCO resolution enhancement by sigma-delta dithering.
// The open-loop DCO path of the ADPLL (sdm clocked by the DCO, bin2therm,
// dco) is driven with a fixed integer code c and fraction x. The modulator
// adds one fine step in x of every 16 DCO cycles, so the mean period over a
// multiple of 16 cycles must equal the mean of 16 - x periods at code c and
// x periods at code c + 1, computed here from the DCO's linear map
// f = 220 MHz + 563 kHz * code. With x = 1 this is the original design's example
// of a 1/16-step interpolation. Checked for c = 320 and every x, and at a
// coarse boundary (c = 319, where the dither carries into the sixteenth fine
// line).
module tb_dco_dither;
  timeunit 1ps; timeprecision 1fs;
  logic rst_n = 1'b1, ph1, ph2, y;
  logic [8:0]  code = 9'd320;
  logic [3:0]  x = '0;
  logic [15:0] therm;
  int checks = 0, failures = 0;

  sdm       u_sdm (.clk(ph1), .rst_n(rst_n), .x(x), .y(y));
  bin2therm u_b2t (.fine(code[3:0]), .dither(y), .therm(therm));
  dco       u_dco (.en(rst_n), .coarse(code[8:4]), .therm(therm), .ph1(ph1), .ph2(ph2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real period_ps(input int c);
    return 1.0e12 / (220.0e6 + 563.0e3 * real'(c));
  endfunction

  task automatic measure(input int c, input int xv);
    realtime t0, t1;
    real p_exp, p_meas;
    code = 9'(c); x = 4'(xv);
    repeat (40) @(posedge ph1);
    t0 = $realtime;
    repeat (16 * 20) @(posedge ph1);
    t1 = $realtime;
    p_meas = (t1 - t0) / 320.0;
    p_exp = (real'(16 - xv) * period_ps(c) + real'(xv) * period_ps(c + 1)) / 16.0;
    check(p_meas > p_exp - 0.02 && p_meas < p_exp + 0.02,
          $sformatf("code %0d + %0d/16: mean period %0.4f ps, expected %0.4f", c, xv, p_meas, p_exp));
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #3000 rst_n = 1'b1;
    for (int xv = 0; xv < 16; xv++) measure(320, xv);
    measure(319, 1);
    measure(319, 15);
    $display("dithered step: %0.3f ps per 1/16 code at 400 MHz (undithered step %0.3f ps)",
             (period_ps(320) - period_ps(321)) / 16.0, period_ps(320) - period_ps(321));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
