// tb_therm2bin: checks the TDC thermometer-to-binary decoder.
// Every proper thermometer code 0..15 must decode to its length, and random
// 15-bit words (codes with bubbles) to their number of ones, counted here
// bit by bit. Combinational; each vector is checked 1 ps after it is applied.
module tb_therm2bin;
  timeunit 1ps; timeprecision 1fs;
  logic [14:0] therm;
  logic [3:0]  bin;
  int checks = 0, failures = 0;

  therm2bin dut (.therm(therm), .bin(bin));

  task automatic apply(input logic [14:0] t);
    int exp_n = 0;
    therm = t;
    for (int i = 0; i < 15; i++) if (t[i]) exp_n++;
    #1;
    checks++;
    if (bin != 4'(exp_n)) begin
      failures++;
      $display("FAIL: therm=%b bin=%0d expected %0d", t, bin, exp_n);
    end
  endtask

  initial begin
    for (int k = 0; k <= 15; k++) apply(15'((32'd1 << k) - 1));
    repeat (200) apply(15'($urandom));
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
