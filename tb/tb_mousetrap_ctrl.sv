// Testbench of the Mousetrap controller against an independent model: the
// latch is open exactly when done equals ack, and an open latch takes req.
// Random req and ack sequences are applied, one change at a time, the way
// neighbouring stages would drive them, plus arbitrary combinations.
module tb_mousetrap_ctrl;
  timeunit 1ns; timeprecision 1fs;

  logic rst, req, ack, done, en;
  logic m_done;
  int checks = 0, failures = 0, captures = 0, blocked = 0;

  mousetrap_ctrl #(.DONE_INIT(1'b1)) dut (.rst(rst), .req(req), .ack(ack), .done(done), .en(en));

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
    rst = 1'b1; req = 1'b0; ack = 1'b0;
    #1;
    check(done == 1'b1 && en == 1'b0, "reset: done = DONE_INIT, latch closed");
    m_done = 1'b1;
    rst = 1'b0;
    #1;
    for (int i = 0; i < 1000; i++) begin
      if ($urandom_range(1, 0)) req = ~req;
      else                      ack = ~ack;
      // Reference: while done == ack the latch is open and done takes req.
      if (m_done == ack) begin
        if (m_done != req) captures++;
        m_done = req;
      end else if (m_done != req) blocked++;
      #1;
      check(done == m_done, $sformatf("done=%0b expected %0b (req=%0b ack=%0b)", done, m_done, req, ack));
      check(en == (m_done == ack), "en is not done XNOR ack");
    end
    check(captures > 10 && blocked > 10, "captures and blocked requests both exercised");
    $display("captures=%0d blocked=%0d", captures, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
