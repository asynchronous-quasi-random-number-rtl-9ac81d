// Delay line: a chain of CELLS delay cells.
//
// The self-timed ring uses two kinds: the long request line (big delta), which
// delays a stage's request until the data through the stage's logic has
// settled (the bundled-data timing assumption), and the short acknowledge
// line (little delta), which holds an acknowledge back long enough to avoid
// hold violations on the previous stage's latch. Every net of the chain carries
// a keep attribute so synthesis does not remove it.
//
// JITTER is handed to every cell (see delay_cell).
//
// Ports: din (input), dout (output).
// Timing: dout follows din after CELLS * CELL_DELAY. CELLS = 0 gives a plain
// wire (an FPGA build can drop the acknowledge lines, which only guard against
// hold violations in the standard-cell version).
// The cells are behavioural, so generic synthesis reduces the line to a wire;
// a real flow maps each cell to a library buffer and keeps it with
// don't-touch constraints.
// The cell counts used by the ring (18 and 6 per stage) come from the reference
// cell totals divided over four stages.
module delay_line #(
  parameter int unsigned CELLS      = 18,
  parameter realtime     CELL_DELAY = 0.185ns,
  parameter realtime     JITTER     = 0.0ns
) (
  input  logic din,
  output logic dout
);
  timeunit 1ns; timeprecision 1fs;

  (* keep *) logic [CELLS:0] tap;

  assign tap[0] = din;
  for (genvar i = 0; i < int'(CELLS); i++) begin : g_cell
    (* keep *) delay_cell #(.DELAY(CELL_DELAY), .JITTER(JITTER)) u_cell (.a(tap[i]), .y(tap[i+1]));
  end
  assign dout = tap[CELLS];
endmodule
