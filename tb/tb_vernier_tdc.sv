// tb_vernier_tdc: checks the Vernier TDC transfer curve.
// LEAD/LAG pulse pairs (LEAD wide, LAG 400 ps) are applied with delays from
// 3 ps to 403 ps in 10 ps steps, never on a multiple of 20 ps. The expected
// code is computed here as the number of stages k = 1..15 with delay > 20k
// ps, i.e. floor(delay / 20) limited to 15; the thermometer output must be
// the matching run of ones. The result must be ready 15 * 60 ps plus the 5 ps comparator delay after LEAD.
module tb_vernier_tdc;
  timeunit 1ps; timeprecision 1fs;
  logic lead = 1'b0, lag = 1'b0;
  logic [14:0] therm;
  logic [3:0]  code;
  int checks = 0, failures = 0;

  vernier_tdc dut (.lead(lead), .lag(lag), .therm(therm), .code(code));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100;
    for (int d = 3; d <= 403; d += 10) begin
      int exp_n;
      logic [15:0] exp_t;
      exp_n = 0;
      for (int k = 1; k <= 15; k++) if (d > 20 * k) exp_n++;
      exp_t = (16'd1 << exp_n) - 16'd1;
      lead = 1'b1;
      #(d) lag = 1'b1;
      #400 lead = 1'b0; lag = 1'b0;
      #(15 * 60 + 20 - 400 - d);
      check(code == 4'(exp_n), $sformatf("delay %0d ps: code %0d, expected %0d", d, code, exp_n));
      check(therm == exp_t[14:0], $sformatf("delay %0d ps: therm %b", d, therm));
      #3000;
    end
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
