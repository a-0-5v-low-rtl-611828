// tb_phase_comparator: checks the latch comparator's arbitration.
// Pairs of pulses are applied with in1 first or in2 first by a random gap of
// 10..200 ps and overlapping widths; q must report the first arrival 20 ps
// after the second edge, qb must be its complement, and q must hold its
// value after both inputs have returned low.
module tb_phase_comparator;
  timeunit 1ps; timeprecision 1fs;
  logic in1 = 1'b0, in2 = 1'b0, q, qb;
  int checks = 0, failures = 0;

  phase_comparator dut (.in1(in1), .in2(in2), .q(q), .qb(qb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100;
    repeat (100) begin
      bit first1;
      int gap;
      first1 = 1'($urandom_range(1));
      gap = $urandom_range(200, 10);
      if (first1) begin in1 = 1'b1; #(gap) in2 = 1'b1; end
      else        begin in2 = 1'b1; #(gap) in1 = 1'b1; end
      #20;
      check(q == first1, $sformatf("first=%0s gap=%0d q=%0b", first1 ? "in1" : "in2", gap, q));
      check(qb == ~q, "qb is the complement of q");
      #300 in1 = 1'b0; in2 = 1'b0;
      #500;
      check(q == first1, "decision held after both inputs low");
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
