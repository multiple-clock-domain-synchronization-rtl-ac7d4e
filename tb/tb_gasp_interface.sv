// tb_gasp_interface: self-checking test of the complete clock-crossing
// interface under the three clock relationships of the evaluation:
// sender and receiver at 1.00 GHz, sender 1.66 GHz with receiver 0.66 GHz,
// and sender 0.66 GHz with receiver 1.66 GHz (periods 1000, 602 and 1514 ps).
//
// For each relationship it
//   1. sends isolated words into an empty interface and checks the latency
//      from the clock1 edge that takes the word to the first clock2 edge at
//      which it can be read: clock1 period T1 to fill cell 1, then
//      SYNC_STAGES+2 to SYNC_STAGES+3 clock2 periods T2 (phase dependent);
//   2. sends back-to-back words to an always-ready receiver and checks the
//      interval between refills of cell 1: one round trip through both
//      synchronisers, more than SYNC_STAGES and at most SYNC_STAGES+1
//      periods of each clock;
//   3. streams random words with random sender and receiver pauses and checks
//      that every word arrives once, unchanged and in order.
// It counts the mechanisms of the control: a sender request queued until the
// cell becomes empty, an empty cell waiting for the sender's request, sender
// back-pressure and receiver back-pressure; each must occur.
`timescale 1ps/1ps
module tb_gasp_interface;
  localparam int unsigned W = 32, SYNC = 2;

  logic clk1 = 1'b0, clk2 = 1'b0, rst1_n = 1'b0, rst2_n = 1'b0;
  logic put_valid = 1'b0, get_ready = 1'b0, put_ready, get_valid;
  logic [W-1:0] put_data = '0, get_data;

  int unsigned half1 = 500, half2 = 500;
  int checks = 0, failures = 0;
  int n_queued = 0, n_empty_first = 0, n_put_stall = 0, n_get_stall = 0;
  logic [W-1:0] sb[$];
  int n_recv = 0, n_acc = 0;
  longint t_put;
  longint t_en1 = -1;
  int     n_rate = 0;
  logic   rate_armed = 1'b0;
  longint rate_lo, rate_hi;
  logic   lat_armed = 1'b0;
  longint lat;
  logic   lat_done;

  gasp_interface #(.DATA_W(W), .SYNC_STAGES(SYNC)) dut (.*);

  always begin #(half1); clk1 = ~clk1; end
  always begin #(half2); clk2 = ~clk2; end

  // monitors, sampling the values present at the active edge
  always @(posedge clk1) if (rst1_n) begin
    if (dut.u_sender_ctrl.req_stored && !dut.u_sender_ctrl.cell_empty) n_queued++;
    if (put_valid && put_ready && dut.u_sender_ctrl.cell_empty
        && !dut.u_sender_ctrl.req_stored) n_empty_first++;
    if (put_valid && !put_ready) n_put_stall++;
    if (dut.u_sender_ctrl.enable1) begin
      if (rate_armed && t_en1 >= 0) begin
        checks++;
        n_rate++;
        if ($time - t_en1 <= rate_lo || $time - t_en1 > rate_hi) begin
          failures++;
          $display("FAIL: cell-1 round trip %0d ps outside (%0d,%0d] at %0t",
                   $time - t_en1, rate_lo, rate_hi, $time);
        end
      end
      t_en1 = $time;
    end
    if (put_valid && put_ready) begin
      sb.push_back(put_data);
      n_acc++;
      t_put = $time;
    end
  end

  always @(posedge clk2) if (rst2_n) begin
    if (get_valid && !get_ready) n_get_stall++;
    if (get_valid && lat_armed && !lat_done) begin
      lat = $time - t_put;
      lat_done = 1'b1;
    end
    if (get_valid && get_ready) begin
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL: word %h received but none sent at %0t", get_data, $time);
      end else begin
        logic [W-1:0] exp;
        exp = sb.pop_front();
        if (get_data !== exp) begin
          failures++;
          $display("FAIL: received %h expected %h at %0t", get_data, exp, $time);
        end
      end
      n_recv++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic run_scenario(input int unsigned p1, input int unsigned p2, input int n_words);
    int sent;
    rst1_n = 0; rst2_n = 0; put_valid = 0; get_ready = 0;
    half1 = p1 / 2; half2 = p2 / 2;
    sb.delete();
    repeat (3) @(posedge clk1);
    repeat (3) @(posedge clk2);
    @(negedge clk1) rst1_n = 1;
    @(negedge clk2) rst2_n = 1;
    // 1. isolated words, latency
    for (int i = 0; i < 6; i++) begin
      lat_done = 0; lat_armed = 1;
      @(negedge clk1);
      put_valid = 1; put_data = W'($urandom);
      do @(negedge clk1); while (sb.size() == 0);
      put_valid = 0;
      wait (lat_done);
      lat_armed = 0;
      begin
        longint lo, hi;
        lo = 2*half1 + (SYNC + 2) * 2*half2;
        hi = 2*half1 + (SYNC + 3) * 2*half2;
        check(lat >= lo && lat <= hi,
              $sformatf("latency %0d ps outside [%0d,%0d]", lat, lo, hi));
        if (i == 0) $display("T1=%0d ps T2=%0d ps: isolated-word latency %0d ps", 2*half1, 2*half2, lat);
      end
      @(negedge clk2) get_ready = 1;
      @(negedge clk2) get_ready = 0;
      repeat (6) @(negedge clk1);
      check(sb.size() == 0, "isolated word not delivered");
    end
    // 2. back-to-back words with an always-ready receiver: cell 1 is refilled
    //    once per round trip, SYNC_STAGES to SYNC_STAGES+1 periods of each clock
    rate_lo = longint'(SYNC) * (2*half1 + 2*half2);
    rate_hi = longint'(SYNC + 1) * (2*half1 + 2*half2);
    @(negedge clk2) get_ready = 1;
    t_en1 = -1;
    rate_armed = 1;
    begin
      int acc0, acc_seen;
      acc0 = n_acc; acc_seen = n_acc;
      @(negedge clk1);
      put_valid = 1; put_data = W'($urandom);
      while (n_acc - acc0 < 21) begin
        @(negedge clk1);
        if (n_acc != acc_seen) begin put_data = W'($urandom); acc_seen = n_acc; end
      end
      put_valid = 0;
    end
    rate_armed = 0;
    repeat (40) @(negedge clk2);
    get_ready = 0;
    check(sb.size() == 0, "back-to-back words not delivered");
    // 3. random streaming
    sent = 0;
    fork
      begin
        while (sent < n_words) begin
          @(negedge clk1);
          if (!(put_valid && !put_ready)) begin  // hold an offered word
            if (put_valid) sent++;
            put_valid = (sent < n_words) && ($urandom_range(0, 3) != 0);
            put_data  = W'($urandom);
          end
        end
        put_valid = 0;
      end
      begin
        int stall_phase;
        stall_phase = 0;
        repeat (n_words * 12) begin
          @(negedge clk2);
          stall_phase++;
          // alternate long receiver pauses with eager reading
          get_ready = (((stall_phase / 40) % 2) != 0) ? ($urandom_range(0, 4) == 0) : 1'b1;
        end
      end
    join_any
    @(negedge clk2) get_ready = 1;
    repeat (40) @(negedge clk2);
    check(sb.size() == 0, $sformatf("%0d words lost in streaming", sb.size()));
  endtask

  initial begin
    run_scenario(1000, 1000, 200);   // 1.00 / 1.00 GHz
    run_scenario(602, 1514, 200);    // 1.66 / 0.66 GHz
    run_scenario(1514, 602, 200);    // 0.66 / 1.66 GHz
    check(n_queued > 0,      "no request queued behind a full cell");
    check(n_empty_first > 0, "no transfer into an already-empty cell");
    check(n_put_stall > 0,   "no sender back-pressure");
    check(n_get_stall > 0,   "no receiver back-pressure");
    check(n_rate > 30, $sformatf("only %0d round trips measured", n_rate));
    check(n_recv == 3 * (6 + 21 + 200), $sformatf("received %0d words", n_recv));
    $display("queued %0d, empty-first %0d, sender stalls %0d, receiver stalls %0d, words %0d",
             n_queued, n_empty_first, n_put_stall, n_get_stall, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
