// Testbench of the delay line at its default length (18 cells): an edge on
// din must reach dout after 18 cell delays, not earlier, and a short pulse
// must come out with its width unchanged. A zero-length line must be a wire.
module tb_delay_line;
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned N = 18;
  localparam realtime     D = 0.185ns;
  localparam realtime     T = N * D;

  logic din, dout, dout0;
  int checks = 0, failures = 0;

  delay_line #(.CELLS(N), .CELL_DELAY(D)) dut (.din(din), .dout(dout));
  // Zero-length line (FPGA build without acknowledge lines): a plain wire.
  delay_line #(.CELLS(0), .CELL_DELAY(D)) dut0 (.din(din), .dout(dout0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $realtime, what); end
  endtask

  initial begin
    #(2us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    #(10ns);
    check(dout == 1'b0, "dout did not settle");
    for (int i = 0; i < 30; i++) begin
      din = ~din;
      #(0.001ns);
      check(dout0 == din, "zero-length line is not a wire");
      #(T - 0.011ns);
      check(dout != din, "edge arrived before CELLS*CELL_DELAY");
      #(0.02ns);
      check(dout == din, "edge not through after CELLS*CELL_DELAY");
      #($urandom_range(5000, 100) * 1ps);
    end
    // A 1 ns pulse travels through unchanged.
    din = 1'b1; #(1ns); din = 1'b0;
    #(T - 1ns + 0.01ns);
    check(dout == 1'b1, "pulse lost in the line");
    #(1ns);
    check(dout == 1'b0, "pulse stretched in the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
