// Uncertainty-range experiment: how far the read-out position spreads when
// the delays vary while the ring runs.
//
// Two rings run side by side from the same seed: one with fixed cell delays
// and one whose every cell transition varies uniformly by +/-0.09 ns around
// 0.185 ns. Each trial resets both, lets them run for a fixed 10 us, raises
// hold and reads how many LFSR steps each has made. The fixed ring must give
// the same step count in every trial: it behaves like a pseudo-random
// generator, with no uncertainty. The varying ring must spread over more than
// one step count, centred near 10 us / 13.32 ns: that spread is the
// uncertainty range. Every value either ring shows is checked against a
// reference LFSR, which also shows that the delay variation never breaks the
// bundled-data timing.
module tb_qrng_uncertainty;
  import qrng_pkg::*;
  timeunit 1ns; timeprecision 1fs;

  localparam realtime JIT    = 0.09ns;
  localparam realtime RUN    = 10us;
  localparam realtime REV    = 4 * REQ_CELLS * CELL_DELAY;
  localparam int      TRIALS = 30;

  logic              rst, hold;
  logic [LFSR_W-1:0] rnd_f, rnd_j, exp_f, exp_j;
  logic              probe_f, probe_j;
  int checks = 0, failures = 0;
  int n_f = 0, n_j = 0;

  qrng_top                  ring_fixed  (.rst(rst), .hold(hold), .seed(DEFAULT_SEED), .rnd(rnd_f), .ack_probe(probe_f));
  qrng_top #(.CELL_JIT(JIT)) ring_varied (.rst(rst), .hold(hold), .seed(DEFAULT_SEED), .rnd(rnd_j), .ack_probe(probe_j));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $realtime, what); end
  endtask

  function automatic logic [LFSR_W-1:0] ref_step(input logic [LFSR_W-1:0] s);
    return {s[126:0], s[127] ^ s[125] ^ s[100] ^ s[98]};
  endfunction

  always @(rnd_f) if (rst) exp_f = rnd_f; else begin
    check(rnd_f == ref_step(exp_f), "fixed ring left the LFSR sequence");
    exp_f = rnd_f; n_f++;
  end
  always @(rnd_j) if (rst) exp_j = rnd_j; else begin
    check(rnd_j == ref_step(exp_j), "varied ring left the LFSR sequence");
    exp_j = rnd_j; n_j++;
  end

  initial begin
    #(TRIALS * (RUN + 100ns) + 10us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f_min = 32'h7fff_ffff, f_max = 0, j_min = 32'h7fff_ffff, j_max = 0;
    real j_sum = 0.0;
    rst = 1'b1; hold = 1'b0;
    for (int t = 0; t < TRIALS; t++) begin
      rst = 1'b1; hold = 1'b0;
      #(20ns);
      n_f = 0; n_j = 0;
      rst = 1'b0;
      #(RUN);
      hold = 1'b1;
      #(3 * REV);
      check(rnd_f == exp_f && rnd_j == exp_j, "held bus is not the last state seen");
      if (n_f < f_min) f_min = n_f;
      if (n_f > f_max) f_max = n_f;
      if (n_j < j_min) j_min = n_j;
      if (n_j > j_max) j_max = n_j;
      j_sum += n_j;
      #(20ns);
    end
    $display("fixed delays:  steps %0d..%0d", f_min, f_max);
    $display("varied delays: steps %0d..%0d, mean %0.2f, nominal %0.2f",
             j_min, j_max, j_sum / TRIALS, RUN / REV);
    check(f_min == f_max, "fixed-delay ring is not repeatable");
    check(j_max - j_min >= 1, "delay variation produced no uncertainty range");
    check(j_sum / TRIALS > RUN / REV - 3.0 && j_sum / TRIALS < RUN / REV + 3.0,
          "varied ring is not centred on the nominal step count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
