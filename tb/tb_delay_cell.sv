// Testbench of the delay-cell model: every edge on a must appear on y exactly
// DELAY later, and y must not move at any other time.
module tb_delay_cell;
  timeunit 1ns; timeprecision 1fs;

  localparam realtime D = 0.185ns;

  logic a, y;
  int checks = 0, failures = 0;
  realtime last_a_edge;

  delay_cell #(.DELAY(D)) dut (.a(a), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $realtime, what); end
  endtask

  initial begin
    #(1us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #(5ns);
    check(y == 1'b0, "y did not settle to a");
    for (int i = 0; i < 50; i++) begin
      a = ~a;
      last_a_edge = $realtime;
      #(D - 0.002ns);
      check(y != a, "y followed a too early");
      #(0.004ns);
      check(y == a, "y did not follow a after DELAY");
      #($urandom_range(3000, 500) * 1ps);
      check(y == a, "y moved without an input edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
