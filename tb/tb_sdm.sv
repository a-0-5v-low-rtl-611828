// tb_sdm: checks the first-order sigma-delta modulator.
// First the dithering example: with x = 1/16 the output must be 0 for 15
// clocks and 1 on the 16th, repeatedly, so the mean output is 1/16. Then, for
// every x, the number of ones in 16 clocks must equal x exactly and the
// output must match an accumulator model kept here (carry of residue + x).
module tb_sdm;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 1'b0, rst_n = 1'b1, y;
  logic [3:0] x = 4'd1;
  int checks = 0, failures = 0;

  sdm dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  always #1250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int model_res;
  initial begin
    #100 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    // x = 0.0625 for 48 clocks
    for (int n = 1; n <= 48; n++) begin
      @(posedge clk); #1;
      check(y == ((n % 16) == 0), $sformatf("x=1/16 clock %0d: y=%0b", n, y));
    end
    // every x value, 16 clocks each, against a model
    model_res = 0;
    rst_n = 1'b0; #10 rst_n = 1'b1;
    for (int xv = 0; xv < 16; xv++) begin
      int ones;
      ones = 0;
      x = 4'(xv);
      for (int n = 0; n < 16; n++) begin
        int sum;
        @(posedge clk); #1;
        sum = model_res + xv;
        check(y == (sum >= 16), $sformatf("x=%0d model mismatch", xv));
        model_res = sum % 16;
        if (y) ones++;
      end
      check(ones == xv, $sformatf("x=%0d gave %0d ones in 16 clocks", xv, ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2500 * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
