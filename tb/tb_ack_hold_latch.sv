// Testbench of the acknowledge hold latch: reset value, transparency while
// hold is low, and a frozen output while hold is high whatever d does.
module tb_ack_hold_latch;
  timeunit 1ns; timeprecision 1fs;

  logic rst, hold, d, q0, q1;
  logic model0, model1;
  int checks = 0, failures = 0;

  ack_hold_latch #(.INIT(1'b0)) dut0 (.rst(rst), .hold(hold), .d(d), .q(q0));
  ack_hold_latch #(.INIT(1'b1)) dut1 (.rst(rst), .hold(hold), .d(d), .q(q1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $realtime, what); end
  endtask

  initial begin
    #(10us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; hold = 1'b1; d = 1'b1;
    #1;
    check(q0 == 1'b0 && q1 == 1'b1, "reset value");
    model0 = 1'b0; model1 = 1'b1;
    rst = 1'b0;
    #1;
    check(q0 == 1'b0 && q1 == 1'b1, "output moved while held after reset");
    for (int i = 0; i < 400; i++) begin
      hold = 1'($urandom_range(1, 0));
      d    = 1'($urandom_range(1, 0));
      if (!hold) begin model0 = d; model1 = d; end
      #1;
      check(q0 == model0 && q1 == model1, $sformatf("hold=%0b d=%0b q=%0b/%0b", hold, d, q0, q1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
