// tb_bin2therm: checks the DCO fine-array decoder for every fine code and
// dither value: the output must have its lowest (fine + dither) bits set and
// all others clear, i.e. T1..T(fine+dither) on.
module tb_bin2therm;
  timeunit 1ps; timeprecision 1fs;
  logic [3:0]  fine;
  logic        dither;
  logic [15:0] therm;
  int checks = 0, failures = 0;

  bin2therm dut (.fine(fine), .dither(dither), .therm(therm));

  initial begin
    for (int f = 0; f < 16; f++)
      for (int d = 0; d < 2; d++) begin
        logic [16:0] expv;
        fine = 4'(f); dither = 1'(d);
        expv = (17'd1 << (f + d)) - 17'd1;
        #1;
        checks++;
        if (therm != expv[15:0]) begin
          failures++;
          $display("FAIL: fine=%0d dither=%0d therm=%b expected %b", f, d, therm, expv[15:0]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
