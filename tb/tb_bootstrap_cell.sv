// tb_bootstrap_cell: checks that the cell inverts its input with the delay
// given on td_ps, for rising and falling inputs and for several delays,
// including a delay change between edges.
module tb_bootstrap_cell;
  timeunit 1ps; timeprecision 1fs;
  logic in = 1'b0, out;
  real  td = 250.0;
  int checks = 0, failures = 0;
  realtime t_edge, t_out;

  bootstrap_cell dut (.in(in), .td_ps(td), .out(out));

  always @(posedge out or negedge out) t_out = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    check(out == 1'b1, "settles to the inverse of a low input");
    for (int i = 0; i < 20; i++) begin
      td = 150.0 + 13.7 * real'(i);
      t_edge = $realtime;
      in = ~in;
      #(td - 1.0);
      check(out == in, $sformatf("edge %0d: output not yet switched", i));
      #2;
      check(out == ~in, $sformatf("edge %0d: output inverted", i));
      check(t_out - t_edge > td - 0.01 && t_out - t_edge < td + 0.01,
            $sformatf("edge %0d: delay %0.2f, expected %0.2f", i, t_out - t_edge, td));
      #500;
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
