// Mousetrap stage controller.
//
// The controller is a one-bit latch, holding the stage's done bit, and an XNOR
// gate. The XNOR compares the stage's own done bit with the done bit of the
// next stage (the acknowledge): while they are equal the stage is empty and its
// latches are transparent (en = 1). A transition on the delayed request then
// passes into the done latch, the two bits differ and the XNOR closes the
// latches, capturing the data. When the next stage has captured the same
// token its done bit follows, the bits are equal again and the stage reopens.
// Signalling is two-phase: each token is one transition of done.
//
// Ports: rst (active high: done = DONE_INIT), req (delayed request from the
// previous stage), ack (acknowledge from the next stage, after its delay line
// and hold latch), done (request to the next stage and acknowledge to the
// previous one), en (latch enable for the stage's data latch).
// Timing: purely combinational feedback, no clock; en falls as soon as done
// takes the new request value.
// The loop done -> en -> done through the latch is the controller itself, so
// lint tools report it as circular logic; it settles as soon as en falls.
// Structure (done latch plus XNOR) follows the reference; reset behaviour is
// this design's choice.
module mousetrap_ctrl #(
  parameter bit DONE_INIT = 1'b0
) (
  input  logic rst,
  input  logic req,
  input  logic ack,
  output logic done,
  output logic en
);
  timeunit 1ns; timeprecision 1fs;

  assign en = ~(done ^ ack);

  always_latch begin
    if (rst)     done = DONE_INIT;
    else if (en) done = req;
  end
endmodule
