// tb_divider: checks the divide-by-16 feedback divider at its default ratio.
// Over 40 output periods the output must rise exactly once every 16 input
// clocks and stay high for 8 of them; after reset the first rising edge must
// come 8 clocks after reset release.
module tb_divider;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 1'b0, rst_n = 1'b1, out;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, high_cnt = 0, rises = 0;

  divider dut (.clk(clk), .rst_n(rst_n), .out(out));

  always #1250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  logic out_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    #1;
    cyc++;
    if (out) high_cnt++;
    if (out && !out_q) begin
      if (last_rise < 0) check(cyc == 8, "first rising edge 8 clocks after reset");
      else check(cyc - last_rise == 16, "rising edges 16 clocks apart");
      if (last_rise >= 0) check(high_cnt == 8 + 1, "output high for 8 of 16 clocks");
      high_cnt = 1;
      last_rise = cyc;
      rises++;
    end
    out_q = out;
  end

  initial begin
    #100 rst_n = 1'b0;
    #10000 rst_n = 1'b1;
    wait (rises == 41);
    check(1'b1, "completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2500 * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
