// tb_phase_selector: checks SIGN and the LEAD/LAG routing.
// UP/DN pulse pairs like the PFD's (the earlier one wide, the later one
// 400 ps) are applied with random order and gap. SIGN must be 1 exactly when
// UP came first; LEAD must rise 30 ps after the earlier input and LAG 30 ps
// after the later one, whichever of UP and DN that is.
module tb_phase_selector;
  timeunit 1ps; timeprecision 1fs;
  logic up = 1'b0, dn = 1'b0, sign, lead, lag;
  int checks = 0, failures = 0;
  realtime lead_r, lag_r;

  phase_selector dut (.up(up), .dn(dn), .sign(sign), .lead(lead), .lag(lag));

  always @(posedge lead) lead_r = $realtime;
  always @(posedge lag)  lag_r  = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100;
    repeat (100) begin
      bit up_first;
      int gap;
      realtime t0;
      up_first = 1'($urandom_range(1));
      gap = $urandom_range(1000, 10);
      t0 = $realtime;
      if (up_first) begin up = 1'b1; #(gap) dn = 1'b1; end
      else          begin dn = 1'b1; #(gap) up = 1'b1; end
      #400 up = 1'b0; dn = 1'b0;
      #2000;
      check(sign == up_first, $sformatf("gap=%0d: SIGN=%0b", gap, sign));
      check(lead_r - t0 > 29.9 && lead_r - t0 < 30.1, $sformatf("LEAD edge at +%0.1f", lead_r - t0));
      check(lag_r - t0 - gap > 29.9 && lag_r - t0 - gap < 30.1, $sformatf("LAG edge at +%0.1f", lag_r - t0));
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
