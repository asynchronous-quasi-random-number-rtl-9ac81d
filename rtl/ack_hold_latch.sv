// Hold latch on an acknowledge signal.
//
// Every acknowledge that reaches a Mousetrap controller passes through this
// level-sensitive latch. While hold is low it is transparent and the ring runs
// freely; while hold is high it is opaque, so no stage sees its successor take
// a new value and no stage reopens: the token stops after at most one more
// revolution and all data latches become stable for reading.
//
// Ports: rst (active high, forces q to INIT), hold (active high), d (the
// delayed acknowledge), q (acknowledge seen by the controller).
// Timing: transparent, zero delay, while hold is low; opaque while hold is high.
// A latch in every acknowledge, controlled by Hold, follows the reference; the
// reset value is this design's choice.
module ack_hold_latch #(
  parameter bit INIT = 1'b0
) (
  input  logic rst,
  input  logic hold,
  input  logic d,
  output logic q
);
  timeunit 1ns; timeprecision 1fs;

  always_latch begin
    if (rst)       q = INIT;
    else if (!hold) q = d;
  end
endmodule
