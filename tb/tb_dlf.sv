// tb_dlf: checks the PI loop filter against a real-valued model.
// The model keeps the integrator as a real number: I += e/16 and
// OUT = I + e/2 with e = +code when sign = 1 and -code otherwise, both
// clamped to [0, 511.9375]. After reset the output must be 256.0. Random
// error sequences (biased up, biased down and balanced) are then applied
// for 2000 clocks so that both clamps are reached; code + frac/16 must equal
// the model exactly every cycle, and sat must flag clamped outputs.
module tb_dlf;
  timeunit 1ps; timeprecision 1fs;
  logic clk = 1'b0, rst_n = 1'b1, sign = 1'b0, sat;
  logic [3:0] tdc_code = '0, frac;
  logic [8:0] dco_code;
  int checks = 0, failures = 0;
  real integ_m, out_m, out_raw, e;
  int n_top = 0, n_bottom = 0;

  dlf dut (.clk(clk), .rst_n(rst_n), .tdc_code(tdc_code), .sign(sign),
           .dco_code(dco_code), .frac(frac), .sat(sat));

  always #20000 clk = ~clk;

  function automatic real clampr(input real v);
    if (v < 0.0) return 0.0;
    if (v > 511.9375) return 511.9375;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #5000;
    check(dco_code == 9'd256 && frac == 4'd0, "reset value 256.0");
    rst_n = 1'b1;
    integ_m = 256.0;
    for (int n = 0; n < 2000; n++) begin
      int bias;
      bias = (n < 700) ? 100 : (n < 1850) ? 0 : 50;  // percent chance of sign = 1
      @(negedge clk);
      tdc_code = 4'($urandom_range(15));
      sign = ($urandom_range(99) < bias);
      e = sign ? real'(tdc_code) : -real'(tdc_code);
      @(posedge clk); #1;
      integ_m = clampr(integ_m + e / 16.0);
      out_raw = integ_m + e / 2.0;
      out_m = clampr(out_raw);
      check(real'(dco_code) + real'(frac) / 16.0 == out_m,
            $sformatf("cycle %0d: out %0d+%0d/16, model %0.4f", n, dco_code, frac, out_m));
      check(sat == (out_raw != out_m), $sformatf("cycle %0d: sat flag", n));
      if (integ_m == 511.9375) n_top++;
      if (integ_m == 0.0) n_bottom++;
    end
    check(n_top > 0, "upper clamp reached");
    check(n_bottom > 0, "lower clamp reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40000.0 * 3000.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
