// Self-timed quasi-random number generator (top level).
//
// A 128-bit Fibonacci LFSR (x^128 + x^126 + x^101 + x^99 + 1) whose state
// circulates, as a single data token, around a ring of four Mousetrap latch
// stages instead of being clocked. Each revolution performs one LFSR step. The
// tap XOR is spread over the ring: stage 1 has no logic, stage 2 XORs taps A
// and B, stage 3 adds tap C, stage 4 adds tap D, and the shift into bit 0 is
// plain wiring from stage 4 back to stage 1. Because the revolution time is
// set by delay lines and latches, it drifts with process, voltage and
// temperature, so the value found on the bus when it is read depends on the
// exact moment of reading: that is the source of the quasi-randomness.
//
// Ring handshake: two-phase Mousetrap (done bits toggle once per token). The
// wrap-around request and acknowledge are inverted, which makes the ring hold
// exactly one token. Reset loads the seed into stage 1 (done = 1, opaque) and
// holds the latches of stages 2-4 transparent (done = 0), so the seed, with
// its partial XORs, already stands in every stage and is the one token.
//
// Reading: raise hold. Every acknowledge then freezes in its hold latch, the
// token stops within one revolution and rnd stays constant; read rnd after
// waiting at least one revolution (4 * REQ_CELLS * CELL_DELAY), then lower hold
// and the ring resumes from where it stopped, skipping no LFSR state.
//
// Ports:
//   rst       active high, asynchronous; hold it for longer than one request
//             delay line (REQ_CELLS * CELL_DELAY) so the delay lines settle.
//   hold      freeze the ring for reading.
//   seed      LFSR seed, taken while rst is high; must be non-zero.
//   rnd       output bus: stage 1's latch, always a complete LFSR state (the
//             current one while stage 1 is opaque, the next one, already
//             computed by the transparent stages, while it is transparent).
//   ack_probe stage 2's done bit (the acknowledge to stage 1); it toggles once
//             per revolution, for measuring the cycle time off chip.
// Timing: with zero-delay logic one revolution takes 4 * REQ_CELLS *
// CELL_DELAY; with the defaults 72 * 0.185 ns = 13.32 ns, one 128-bit value
// per revolution (about 75 MHz, 9.6 Gbit/s). CELL_JIT (default 0) adds a
// random per-transition variation to every delay cell, for simulating the
// dynamic delay variation that makes the read-out position uncertain.
//
// The latches and the combinational loops through them (done -> XNOR -> en ->
// done, and the ring itself) are the circuit: it is self-timed and has no
// clock, so the latch and loop warnings of lint tools are expected here.
//
// From the reference: the polynomial, Fibonacci form, four Mousetrap stages,
// the XOR distribution, delay lines on requests and acknowledges, the hold
// latches and the seed load at reset. This design's own choices: the inverted
// wrap-around that makes one token, the reset values, the seed as an input,
// the stage whose latch drives the bus and the cell delay.
module qrng_top
  import qrng_pkg::*;
#(
  parameter int unsigned W          = LFSR_W,
  parameter int unsigned TA         = TAP_A,
  parameter int unsigned TB         = TAP_B,
  parameter int unsigned TC         = TAP_C,
  parameter int unsigned TD         = TAP_D,
  parameter int unsigned REQ_N      = REQ_CELLS,
  parameter int unsigned ACK_N      = ACK_CELLS,
  parameter realtime     CELL_DLY   = CELL_DELAY,
  parameter realtime     CELL_JIT   = 0.0ns
) (
  input  logic         rst,
  input  logic         hold,
  input  logic [W-1:0] seed,
  output logic [W-1:0] rnd,
  output logic         ack_probe
);
  timeunit 1ns; timeprecision 1fs;

  // Stage 1 holds the bare state; stages 2-4 hold {partial XOR, state}.
  logic [W-1:0] d1_in, d1_out;
  logic [W:0]   d2_in, d2_out, d3_in, d3_out, d4_in, d4_out;
  logic         done1, done2, done3, done4;
  logic         en1, en2, en3, en4;

  // Distributed feedback logic, one 2-input XOR per stage from stage 2 on.
  assign d2_in = {d1_out[TA-1] ^ d1_out[TB-1], d1_out};
  assign d3_in = {d2_out[W] ^ d2_out[TC-1], d2_out[W-1:0]};
  assign d4_in = {d3_out[W] ^ d3_out[TD-1], d3_out[W-1:0]};
  // Shift by one; the finished feedback bit enters at bit 0.
  assign d1_in = {d4_out[W-2:0], d4_out[W]};

  mousetrap_stage #(.W(W), .DONE_INIT(1'b1), .LOAD_INIT(1'b1), .ACK_INIT(1'b0), .REQ_CELLS(REQ_N),
                    .ACK_CELLS(ACK_N), .CELL_DELAY(CELL_DLY), .JITTER(CELL_JIT)) u_s1 (
    .rst(rst), .hold(hold), .req_in(~done4), .din(d1_in), .init_data(seed),
    .ack_in(done2), .done(done1), .dout(d1_out), .en(en1)
  );
  mousetrap_stage #(.W(W+1), .DONE_INIT(1'b0), .LOAD_INIT(1'b0), .ACK_INIT(1'b0), .REQ_CELLS(REQ_N),
                    .ACK_CELLS(ACK_N), .CELL_DELAY(CELL_DLY), .JITTER(CELL_JIT)) u_s2 (
    .rst(rst), .hold(hold), .req_in(done1), .din(d2_in), .init_data('0),
    .ack_in(done3), .done(done2), .dout(d2_out), .en(en2)
  );
  mousetrap_stage #(.W(W+1), .DONE_INIT(1'b0), .LOAD_INIT(1'b0), .ACK_INIT(1'b0), .REQ_CELLS(REQ_N),
                    .ACK_CELLS(ACK_N), .CELL_DELAY(CELL_DLY), .JITTER(CELL_JIT)) u_s3 (
    .rst(rst), .hold(hold), .req_in(done2), .din(d3_in), .init_data('0),
    .ack_in(done4), .done(done3), .dout(d3_out), .en(en3)
  );
  mousetrap_stage #(.W(W+1), .DONE_INIT(1'b0), .LOAD_INIT(1'b0), .ACK_INIT(1'b0), .REQ_CELLS(REQ_N),
                    .ACK_CELLS(ACK_N), .CELL_DELAY(CELL_DLY), .JITTER(CELL_JIT)) u_s4 (
    .rst(rst), .hold(hold), .req_in(done3), .din(d4_in), .init_data('0),
    .ack_in(~done1), .done(done4), .dout(d4_out), .en(en4)
  );

  assign rnd       = d1_out;
  assign ack_probe = done2;

  // Ring invariant: with the inverted wrap-around the done bits always differ
  // at an odd number of stage boundaries, so at least one latch is closed and
  // the data path never forms a transparent loop.
  always_comb
    if (!rst) assert (!(en1 && en2 && en3 && en4))
      else $error("qrng_top: all four stages transparent, token lost");

  initial begin
    assert (TA <= W && TB <= W && TC <= W && TD <= W && W >= 2)
      else $error("qrng_top: taps must lie within the register");
  end
endmodule
