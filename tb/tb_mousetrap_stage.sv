// Testbench of one Mousetrap stage between a driving environment and a
// consuming one. Tokens are sent as two-phase request transitions with their
// data set up first. For each token it checks that the stage captures exactly
// REQ_CELLS cell delays after the request when it is empty, that the captured
// data stay put while the input changes, that a token sent before the
// acknowledge waits and is captured ACK_CELLS cell delays after the
// acknowledge, and that a held acknowledge (hold high) keeps the stage closed.
module tb_mousetrap_stage;
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned W    = 129;
  localparam int unsigned NREQ = 18;
  localparam int unsigned NACK = 6;
  localparam realtime     D    = 0.185ns;
  localparam realtime     DREQ = NREQ * D;
  localparam realtime     DACK = NACK * D;

  logic         rst, hold, req_in, ack_in, done, en;
  logic [W-1:0] din, dout, init_data, dout_t;
  logic         done_t, en_t;
  int checks = 0, failures = 0, waits = 0, held = 0;

  mousetrap_stage #(.W(W), .DONE_INIT(1'b0), .ACK_INIT(1'b0), .REQ_CELLS(NREQ),
                    .ACK_CELLS(NACK), .CELL_DELAY(D)) dut (
    .rst(rst), .hold(hold), .req_in(req_in), .din(din), .init_data(init_data),
    .ack_in(ack_in), .done(done), .dout(dout), .en(en)
  );

  // Second copy that is held transparent, not loaded, during reset.
  mousetrap_stage #(.W(W), .DONE_INIT(1'b0), .LOAD_INIT(1'b0), .REQ_CELLS(NREQ),
                    .ACK_CELLS(NACK), .CELL_DELAY(D)) dut_t (
    .rst(rst), .hold(hold), .req_in(1'b0), .din(din), .init_data(init_data),
    .ack_in(1'b0), .done(done_t), .dout(dout_t), .en(en_t)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at %0t: %s", $realtime, what); end
  endtask

  function automatic logic [W-1:0] rnd_word();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #(50us);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] tok, tok2;
    logic         d0;
    rst = 1'b1; hold = 1'b0; req_in = 1'b0; ack_in = 1'b0;
    init_data = rnd_word(); din = rnd_word();
    #(10ns);
    check(dout == init_data && done == 1'b0, "reset loads init_data and DONE_INIT");
    check(dout_t == din, "LOAD_INIT = 0: latch not transparent during reset");
    din = rnd_word();
    #(1ns);
    check(dout_t == din && dout == init_data, "reset: transparent copy must follow, loaded copy must hold");
    rst = 1'b0;
    #(1ns);
    for (int i = 0; i < 60; i++) begin
      // Send a token into the empty stage.
      tok = rnd_word();
      din = tok;
      #(0.5ns);
      d0 = done;
      req_in = ~req_in;
      #(DREQ - 0.01ns);
      check(done == d0, "captured before the request delay");
      #(0.02ns);
      check(done == req_in && en == 1'b0, "not captured after the request delay");
      check(dout == tok, "wrong data captured");
      din = rnd_word();
      #(1ns);
      check(dout == tok, "closed latch followed its input");
      if (i % 3 == 0) begin
        // Next token arrives before the acknowledge: it must wait.
        tok2 = rnd_word();
        din = tok2;
        #(0.5ns);
        req_in = ~req_in;
        #(DREQ + 1ns);
        check(done != req_in && dout == tok, "token overran an unacknowledged one");
        if (i % 2 == 0) begin
          // Acknowledge under hold: still closed.
          hold = 1'b1;
          ack_in = ~ack_in;
          #(DACK + 2ns);
          check(done != req_in && dout == tok, "stage opened while hold was high");
          held++;
          hold = 1'b0;
          #(0.01ns);
          check(done == req_in && dout == tok2, "stage did not take the waiting token when hold fell");
        end else begin
          ack_in = ~ack_in;
          #(DACK - 0.01ns);
          check(done != req_in, "opened before the acknowledge delay");
          #(0.02ns);
          check(done == req_in && dout == tok2, "waiting token not taken after the acknowledge delay");
        end
        waits++;
        // Acknowledge the second token too.
        #(1ns);
        ack_in = ~ack_in;
        #(DACK + 0.5ns);
      end else begin
        ack_in = ~ack_in;
        #(DACK + 0.5ns);
      end
      check(en == 1'b1, "stage not empty after its token was acknowledged");
      #($urandom_range(3000, 0) * 1ps);
    end
    check(waits > 0 && held > 0, "waiting and hold cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
