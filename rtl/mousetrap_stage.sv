// One Mousetrap pipeline stage of the self-timed ring.
//
// A stage holds W bits of data in a level-sensitive latch, enabled by its
// Mousetrap controller. The request from the previous stage first runs through
// a REQ_CELLS delay line (big delta), long enough to cover the combinational
// logic in front of this stage's data latch, so the data are stable when the
// request reaches the done latch. The acknowledge from the next stage runs
// through an ACK_CELLS delay line (little delta), against hold violations, and
// then through the hold latch, which freezes it while hold is high.
// The stage's combinational logic sits outside it, on din.
//
// Ports: rst (active high; done takes DONE_INIT; the data latch takes
// init_data if LOAD_INIT is set, otherwise it is transparent),
// hold (freeze acknowledges), req_in (done of the previous stage), din (data
// from the previous stage, after this stage's logic), ack_in (done of the next
// stage), done (this stage's request/acknowledge), dout (latched data), en
// (latch enable, 1 = transparent).
// Timing: a token entering req_in is captured REQ_CELLS*CELL_DELAY later if the
// stage is transparent; the stage reopens ACK_CELLS*CELL_DELAY after the next
// stage's done follows.
// The latches and the loop through the controller are intended (self-timed
// logic, no clock), so lint tools report latches and circular logic here.
// The stage structure follows the reference; placing the request delay at the
// receiving stage and the reset behaviour of the data latch are this design's
// choices.
module mousetrap_stage #(
  parameter int unsigned W          = 129,
  parameter bit          DONE_INIT  = 1'b0,
  parameter bit          LOAD_INIT  = 1'b1,
  parameter bit          ACK_INIT   = 1'b0,
  parameter int unsigned REQ_CELLS  = 18,
  parameter int unsigned ACK_CELLS  = 6,
  parameter realtime     CELL_DELAY = 0.185ns,
  parameter realtime     JITTER     = 0.0ns
) (
  input  logic         rst,
  input  logic         hold,
  input  logic         req_in,
  input  logic [W-1:0] din,
  input  logic [W-1:0] init_data,
  input  logic         ack_in,
  output logic         done,
  output logic [W-1:0] dout,
  output logic         en
);
  timeunit 1ns; timeprecision 1fs;

  logic req_dly, ack_dly, ack_held;

  delay_line #(.CELLS(REQ_CELLS), .CELL_DELAY(CELL_DELAY), .JITTER(JITTER)) u_req_dly (.din(req_in), .dout(req_dly));
  delay_line #(.CELLS(ACK_CELLS), .CELL_DELAY(CELL_DELAY), .JITTER(JITTER)) u_ack_dly (.din(ack_in), .dout(ack_dly));

  ack_hold_latch #(.INIT(ACK_INIT)) u_hold (.rst(rst), .hold(hold), .d(ack_dly), .q(ack_held));

  mousetrap_ctrl #(.DONE_INIT(DONE_INIT)) u_ctrl (
    .rst(rst), .req(req_dly), .ack(ack_held), .done(done), .en(en)
  );

  // During reset the data latch either loads init_data (LOAD_INIT = 1) or is
  // held transparent, so that when reset falls it already holds its input and
  // closing it in the same instant loses nothing.
  always_latch begin
    if (rst)     dout = LOAD_INIT ? init_data : din;
    else if (en) dout = din;
  end
endmodule
