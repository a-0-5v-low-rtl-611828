// tb_pfd: checks the phase-frequency detector's pulses.
// For random phase offsets of -2..+2 ns between 25 MHz reference and
// feedback clocks, the earlier input's output must rise at its clock edge and
// stay high for |offset| + 400 ps, and the later one must rise at its edge
// and stay high for 400 ps (the reset path delay). Widths are measured here
// from the recorded edge times, with a 1 ps tolerance.
module tb_pfd;
  timeunit 1ps; timeprecision 1fs;
  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b1, up, dn;
  int checks = 0, failures = 0;
  realtime up_r, up_f, dn_r, dn_f;

  pfd dut (.ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .up(up), .dn(dn));

  always @(posedge up) up_r = $realtime;
  always @(negedge up) up_f = $realtime;
  always @(posedge dn) dn_r = $realtime;
  always @(negedge dn) dn_f = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1.0) && (b - a < 1.0);
  endfunction

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    repeat (60) begin
      int d;
      realtime t0;
      d = int'($urandom_range(4000)) - 2000;   // fb minus ref, ps
      if (d == 0) d = 1;
      t0 = $realtime + 2000;
      fork
        begin #2000 ref_clk = 1'b1; #20000 ref_clk = 1'b0; end
        begin #(2000 + d) fb_clk = 1'b1; #20000 fb_clk = 1'b0; end
      join_none
      #12000;
      if (d > 0) begin
        check(near(up_r, t0) && near(up_f - up_r, d + 400.0), $sformatf("d=%0d: UP width %0.1f", d, up_f - up_r));
        check(near(dn_r, t0 + d) && near(dn_f - dn_r, 400.0), $sformatf("d=%0d: DN width %0.1f", d, dn_f - dn_r));
      end else begin
        check(near(dn_r, t0 + d) && near(dn_f - dn_r, -d + 400.0), $sformatf("d=%0d: DN width %0.1f", d, dn_f - dn_r));
        check(near(up_r, t0) && near(up_f - up_r, 400.0), $sformatf("d=%0d: UP width %0.1f", d, up_f - up_r));
      end
      #30000;
    end
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
