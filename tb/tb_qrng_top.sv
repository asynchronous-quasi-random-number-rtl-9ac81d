// End-to-end testbench of the quasi-random number generator at its default
// parameters (128 bits, 18 request and 6 acknowledge cells per stage).
//
// A reference LFSR step, written independently of the ring, checks every value
// that appears on rnd: each new value must be the LFSR successor of the last,
// starting from the seed. It also measures the revolution time on stage 1's
// done bit and on ack_probe against 4 * 18 * CELL_DELAY, checks the first
// capture after reset, freezes the ring with hold at random moments (the bus
// must stay constant and no done bit may move while hold is high, and the
// sequence must continue without a gap afterwards) and re-seeds it with reset.
// Each of these mechanisms is counted and must have happened.
module tb_qrng_top;
  import qrng_pkg::*;
  timeunit 1ns; timeprecision 1fs;

  localparam realtime REV = 4 * REQ_CELLS * CELL_DELAY;   // one revolution
  localparam realtime DREQ = REQ_CELLS * CELL_DELAY;

  logic              rst, hold;
  logic [LFSR_W-1:0] seed, rnd;
  logic              ack_probe;

  int checks = 0, failures = 0;
  int steps = 0, holds = 0, reseeds = 0, period_checks = 0, probe_checks = 0;

  qrng_top dut (.rst(rst), .hold(hold), .seed(seed), .rnd(rnd), .ack_probe(ack_probe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  function automatic logic [LFSR_W-1:0] ref_step(input logic [LFSR_W-1:0] s);
    logic fb;
    fb = s[127] ^ s[125] ^ s[100] ^ s[98];
    return {s[126:0], fb};
  endfunction

  // Every change of rnd outside reset must be one LFSR step.
  logic [LFSR_W-1:0] expect_val;
  always @(rnd) begin
    if (rst) expect_val = rnd;
    else begin
      check(rnd == ref_step(expect_val), $sformatf("rnd %h is not the successor of %h", rnd, expect_val));
      expect_val = rnd;
      steps++;
    end
  end

  // Revolution time, measured on stage 1's done bit and on ack_probe while the
  // ring runs freely.
  realtime last_done1 = -1.0, last_probe = -1.0, rst_fall = 0.0;
  bit      first_after_reset = 0;
  bit      freerun = 0;
  always @(dut.done1) if (!rst) begin
    if (first_after_reset) begin
      // The seed is in stage 1; stages 2, 3 and 4 take it in turn, the first
      // at once, and stage 1 takes the successor three request delays later.
      check(($realtime - rst_fall) > 3 * DREQ - 0.01 && ($realtime - rst_fall) < 3 * DREQ + 0.01,
            $sformatf("first stage-1 capture %0.3f ns after reset, expected %0.3f ns", $realtime - rst_fall, 3 * DREQ));
      first_after_reset = 0;
    end else if (freerun && last_done1 >= 0.0) begin
      check(($realtime - last_done1) > REV - 0.01 && ($realtime - last_done1) < REV + 0.01,
            $sformatf("revolution took %0.3f ns, expected %0.3f ns", $realtime - last_done1, REV));
      period_checks++;
    end
    last_done1 = $realtime;
  end
  always @(ack_probe) if (!rst) begin
    if (freerun && last_probe >= 0.0) begin
      check(($realtime - last_probe) > REV - 0.01 && ($realtime - last_probe) < REV + 0.01,
            $sformatf("ack_probe period %0.3f ns, expected %0.3f ns", $realtime - last_probe, REV));
      probe_checks++;
    end
    last_probe = $realtime;
  end

  // Any handshake activity while the ring should be frozen.
  bit frozen = 0;
  always @(dut.done1 or dut.done2 or dut.done3 or dut.done4)
    if (frozen) check(1'b0, "a done bit moved while the ring was held");

  task automatic do_reset(input logic [LFSR_W-1:0] s);
    freerun = 0;
    rst = 1'b1;
    seed = s;
    #(10ns);
    check(rnd == s, "rnd does not show the seed during reset");
    last_done1 = -1.0;
    last_probe = -1.0;
    first_after_reset = 1;
    rst_fall = $realtime;
    rst = 1'b0;
    #(2 * REV);
    freerun = 1;
  endtask

  task automatic do_hold();
    logic [LFSR_W-1:0] held;
    int steps_before;
    freerun = 0;
    hold = 1'b1;
    #(2 * REV);                       // let the token stop
    held = rnd;
    steps_before = steps;
    frozen = 1;
    #(5 * REV);
    frozen = 0;
    check(rnd == held && steps == steps_before, "rnd moved while hold was high");
    holds++;
    hold = 1'b0;
    last_done1 = -1.0;
    last_probe = -1.0;
    #(2 * REV);
    check(steps > steps_before, "ring did not resume after hold");
    freerun = 1;
  endtask

  initial begin
    #(200us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; hold = 1'b0; seed = DEFAULT_SEED;
    do_reset(DEFAULT_SEED);
    reseeds++;
    for (int i = 0; i < 40; i++) begin
      #($urandom_range(20000, 1000) * 1ps);
      do_hold();
    end
    #(200 * REV);
    // Re-seed with a random non-zero value and run again.
    do_reset({$urandom, $urandom, $urandom, $urandom | 32'h1});
    reseeds++;
    for (int i = 0; i < 20; i++) begin
      #($urandom_range(20000, 1000) * 1ps);
      do_hold();
    end
    #(2000 * REV);

    $display("steps=%0d holds=%0d reseeds=%0d period_checks=%0d probe_checks=%0d",
             steps, holds, reseeds, period_checks, probe_checks);
    check(steps > 1000, "too few LFSR steps");
    check(holds > 0, "hold never exercised");
    check(reseeds > 1, "re-seed never exercised");
    check(period_checks > 100, "revolution time never measured");
    check(probe_checks > 100, "ack_probe never measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
