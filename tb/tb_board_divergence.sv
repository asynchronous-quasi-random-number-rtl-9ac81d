// Two-instance experiment: two copies of the generator that differ only in
// their delay-cell speed, as two otherwise identical chips with different
// process corners would. Cell delays are set so that one revolution takes
// 13.89 ns on the first copy and 13.33 ns on the second, the cycle times
// measured on two prototype boards.
//
// Both start from the same seed at the same moment. The testbench checks that
// each copy produces the exact LFSR sequence, that the measured cycle times
// are the intended ones, that the step counts drift apart by one every
// P1*P2/|P1-P2| (about 330.6 ns), and that values read with hold at the same
// moment on both copies are different states of the same sequence, separated
// by the number of steps the drift predicts. It also reports the output bit
// rate of the faster copy (128 bits per revolution, about 9.6 Gbit/s).
module tb_board_divergence;
  import qrng_pkg::*;
  timeunit 1ns; timeprecision 1fs;

  localparam realtime P1 = 13.89ns;
  localparam realtime P2 = 13.33ns;
  localparam realtime D1 = P1 / (4 * REQ_CELLS);
  localparam realtime D2 = P2 / (4 * REQ_CELLS);
  localparam realtime DIV = P1 * P2 / (P1 - P2);

  logic              rst, hold;
  logic [LFSR_W-1:0] rnd1, rnd2, exp1, exp2;
  logic              probe1, probe2;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, slips = 0;
  realtime slip_t[$];
  realtime t_start;

  qrng_top #(.CELL_DLY(D1)) board1 (.rst(rst), .hold(hold), .seed(DEFAULT_SEED), .rnd(rnd1), .ack_probe(probe1));
  qrng_top #(.CELL_DLY(D2)) board2 (.rst(rst), .hold(hold), .seed(DEFAULT_SEED), .rnd(rnd2), .ack_probe(probe2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $realtime, what); end
  endtask

  function automatic logic [LFSR_W-1:0] ref_step(input logic [LFSR_W-1:0] s);
    return {s[126:0], s[127] ^ s[125] ^ s[100] ^ s[98]};
  endfunction

  function automatic logic [LFSR_W-1:0] ref_skip(input logic [LFSR_W-1:0] s, input int n);
    for (int i = 0; i < n; i++) s = ref_step(s);
    return s;
  endfunction

  always @(rnd1) if (rst) exp1 = rnd1; else begin
    check(rnd1 == ref_step(exp1), "board 1 left the LFSR sequence");
    exp1 = rnd1; n1++;
  end
  always @(rnd2) if (rst) exp2 = rnd2; else begin
    check(rnd2 == ref_step(exp2), "board 2 left the LFSR sequence");
    exp2 = rnd2; n2++;
    if (n2 - n1 > slips) begin
      slips = n2 - n1;
      slip_t.push_back($realtime);
    end
  end

  realtime lp1 = -1.0, lp2 = -1.0, per1 = 0.0, per2 = 0.0;
  always @(probe1) if (!rst) begin if (lp1 >= 0.0) per1 = $realtime - lp1; lp1 = $realtime; end
  always @(probe2) if (!rst) begin if (lp2 >= 0.0) per2 = $realtime - lp2; lp2 = $realtime; end

  initial begin
    #(100us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime mean_div, fp1, fp2;
    rst = 1'b1; hold = 1'b0;
    #(10ns);
    t_start = $realtime;
    rst = 1'b0;
    #(10us);
    fp1 = per1;
    fp2 = per2;
    check(per1 > P1 - 0.001ns && per1 < P1 + 0.001ns, $sformatf("board 1 cycle %0.3f ns", per1));
    check(per2 > P2 - 0.001ns && per2 < P2 + 0.001ns, $sformatf("board 2 cycle %0.3f ns", per2));
    // Mean time between slips, over the whole run.
    check(slip_t.size() > 10, "boards never drifted apart");
    mean_div = (slip_t[slip_t.size()-1] - slip_t[0]) / (slip_t.size() - 1);
    check(mean_div > 0.98 * DIV && mean_div < 1.02 * DIV,
          $sformatf("divergence period %0.1f ns, expected %0.1f ns", mean_div, DIV));
    // Read both with hold at the same moment.
    for (int k = 0; k < 5; k++) begin
      int d;
      #($urandom_range(5000, 500) * 1ps);
      hold = 1'b1;
      #(3 * P1);
      d = n2 - n1;
      check(d >= 0 && rnd2 == ref_skip(rnd1, d), "held values are not the same sequence offset by the drift");
      check(d >= int'(($realtime - t_start) / DIV) - 2 && d <= int'(($realtime - t_start) / DIV) + 2,
            $sformatf("step offset %0d against expected %0.1f", d, ($realtime - t_start) / DIV));
      check(rnd1 != rnd2, "both boards read the same value");
      hold = 1'b0;
    end
    $display("cycle times %0.3f ns / %0.3f ns, divergence period %0.1f ns (expected %0.1f ns), slips %0d",
             fp1, fp2, mean_div, DIV, slips);
    $display("board 2 output rate: %0.2f Gbit/s", LFSR_W / fp2);
    check(LFSR_W / fp2 > 9.5 && LFSR_W / fp2 < 9.7, "output rate of the faster board is not ~9.6 Gbit/s");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
