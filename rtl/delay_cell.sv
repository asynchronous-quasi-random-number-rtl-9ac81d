// Behavioural model of one delay-line buffer cell.
//
// In silicon this is a standard-cell buffer (or an FPGA LUT configured as a
// buffer) that synthesis must keep; the request and acknowledge delay lines are
// chains of it. Here it is modelled as a buffer with a transport delay so that
// the self-timed ring can be simulated: every cell adds DELAY to the path.
// Synthesis ignores the delay and sees a plain buffer.
//
// JITTER (default 0) models dynamic delay variation, such as supply noise or
// temperature: when it is non-zero each transition is delayed by DELAY plus a
// value drawn uniformly from [-JITTER, +JITTER]. Keep JITTER below DELAY.
//
// Ports: a (input), y (output, a delayed).
// Timing: y follows a after DELAY (+/- JITTER); no pulse filtering is
// modelled.
// The fixed per-cell delay follows a unit-delay simulation style; the delay
// value and the jitter model are this design's own.
module delay_cell #(
  parameter realtime DELAY  = 0.185ns,
  parameter realtime JITTER = 0.0ns
) (
  input  logic a,
  output logic y
);
  timeunit 1ns; timeprecision 1fs;

  if (JITTER == 0.0) begin : g_fixed
    assign #(DELAY) y = a;
  end else begin : g_jitter
    realtime d;
    initial begin
      #(DELAY);
      y <= a;
    end
    always @(a) begin
      d = DELAY + JITTER * ((real'($urandom % 2001) - 1000.0) / 1000.0);
      y <= #(d) a;
    end
  end
endmodule
