// tb_dco: checks the DCO model's code-to-frequency map and its start-up.
// With en low the ring must be static; after en rises it must oscillate.
// For a set of codes (coarse, fine thermometer) the period is measured over
// 50 cycles and compared with 1 / (220 MHz + 563 kHz * n), n = 16*coarse +
// number of fine lines on; ph2 must be the complement of ph1 one cell delay
// earlier, so it is low whenever ph1 has just risen.
module tb_dco;
  timeunit 1ps; timeprecision 1fs;
  logic en = 1'b0, ph1, ph2;
  logic [4:0]  coarse = 5'd0;
  logic [15:0] therm = '0;
  int checks = 0, failures = 0;
  int edges = 0, bad_ph2 = 0;

  dco dut (.en(en), .coarse(coarse), .therm(therm), .ph1(ph1), .ph2(ph2));

  always @(posedge ph1) begin
    edges++;
    #1 if (ph2 != 1'b0) bad_ph2++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int c, input int lines);
    realtime t0, t1;
    real f_exp, p_exp, p_meas;
    coarse = 5'(c);
    therm = 16'((32'd1 << lines) - 1);
    repeat (3) @(posedge ph1);
    t0 = $realtime;
    repeat (50) @(posedge ph1);
    t1 = $realtime;
    f_exp = 220.0e6 + 563.0e3 * real'(16 * c + lines);
    p_exp = 1.0e12 / f_exp;
    p_meas = (t1 - t0) / 50.0;
    check(p_meas > p_exp - 0.05 && p_meas < p_exp + 0.05,
          $sformatf("coarse %0d lines %0d: period %0.3f ps, expected %0.3f", c, lines, p_meas, p_exp));
  endtask

  initial begin
    #3000;
    edges = 0;   // start-up settling is over
    #5000;
    check(edges == 0, "no oscillation while en is low");
    en = 1'b1;
    #20000;
    check(edges >= 4, "oscillates after en rises");
    bad_ph2 = 0;
    measure(0, 0);
    measure(0, 16);
    measure(20, 0);
    measure(19, 16);   // same n as (20, 0)
    measure(20, 8);
    measure(31, 16);
    measure(10, 5);
    check(bad_ph2 == 0, "ph2 low right after each ph1 rising edge");
    en = 1'b0;
    #10000;
    edges = 0;
    #10000;
    check(edges == 0, "stops when en falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
