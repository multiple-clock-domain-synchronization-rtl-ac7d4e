// tb_gasp_link: end-to-end test of one inter-switch link at its default
// parameters (32-bit words, 4-entry switch FIFOs, 2-stage synchronisers).
//
// The sender switch pushes a random stream into its FIFO on clock1; the
// receiver switch pops from its FIFO on clock2 with random pauses. The test
// runs the three clock relationships of the evaluation (1.00/1.00,
// 1.66/0.66 and 0.66/1.66 GHz) and checks that every word arrives once,
// unchanged and in order. It counts each mechanism of the link and fails if
// one never happened: the sender FIFO full, the receiver FIFO full, a sender
// request queued behind a full buffer cell, an empty buffer cell waiting for
// a request, and the receiver holding off its output.
`timescale 1ps/1ps
module tb_gasp_link;
  localparam int unsigned W = gasp_pkg::DATA_W;
  localparam int N_WORDS = 300;

  logic clk1 = 1'b0, clk2 = 1'b0, rst1_n = 1'b0, rst2_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0, in_ready, out_valid;
  logic [W-1:0] in_data = '0, out_data;

  int unsigned half1 = 500, half2 = 500;
  int checks = 0, failures = 0;
  int n_tx_full = 0, n_rx_full = 0, n_queued = 0, n_empty_first = 0, n_out_stall = 0;
  int n_recv = 0;
  logic [W-1:0] sb[$];

  gasp_link dut (.*);

  always begin #(half1); clk1 = ~clk1; end
  always begin #(half2); clk2 = ~clk2; end

  always @(posedge clk1) if (rst1_n) begin
    if (in_valid && !in_ready) n_tx_full++;
    if (dut.u_if.u_sender_ctrl.req_stored && !dut.u_if.u_sender_ctrl.cell_empty) n_queued++;
    if (dut.u_if.u_sender_ctrl.load_in && dut.u_if.u_sender_ctrl.cell_empty
        && !dut.u_if.u_sender_ctrl.req_stored) n_empty_first++;
    if (in_valid && in_ready) sb.push_back(in_data);
  end

  always @(posedge clk2) if (rst2_n) begin
    if (dut.rx_valid && !dut.rx_ready) n_rx_full++;
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      checks++;
      n_recv++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL: %h received, nothing outstanding, at %0t", out_data, $time);
      end else if (out_data !== sb[0]) begin
        failures++;
        $display("FAIL: received %h expected %h at %0t", out_data, sb[0], $time);
        void'(sb.pop_front());
      end else void'(sb.pop_front());
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic run_scenario(input int unsigned p1, input int unsigned p2);
    int sent;
    rst1_n = 0; rst2_n = 0; in_valid = 0; out_ready = 0;
    half1 = p1 / 2; half2 = p2 / 2;
    sb.delete();
    repeat (3) @(posedge clk1);
    repeat (3) @(posedge clk2);
    @(negedge clk1) rst1_n = 1;
    @(negedge clk2) rst2_n = 1;
    sent = 0;
    fork
      begin
        while (sent < N_WORDS) begin
          @(negedge clk1);
          if (!(in_valid && !in_ready)) begin
            if (in_valid) sent++;
            in_valid = (sent < N_WORDS) && ($urandom_range(0, 4) != 0);
            in_data  = W'($urandom);
          end
        end
        in_valid = 0;
      end
      begin
        int k;
        k = 0;
        forever begin
          @(negedge clk2);
          k++;
          out_ready = (((k / 60) % 2) != 0) ? ($urandom_range(0, 5) == 0) : ($urandom_range(0, 3) != 0);
        end
      end
    join_any
    disable fork;
    @(negedge clk2) out_ready = 1;
    repeat (60) @(negedge clk2);
    check(sb.size() == 0, $sformatf("%0d words not delivered (T1=%0d T2=%0d)", sb.size(), p1, p2));
  endtask

  initial begin
    run_scenario(1000, 1000);
    run_scenario(602, 1514);
    run_scenario(1514, 602);
    check(n_recv == 3 * N_WORDS, $sformatf("received %0d of %0d words", n_recv, 3 * N_WORDS));
    check(n_tx_full > 0,     "sender FIFO never full");
    check(n_rx_full > 0,     "receiver FIFO never full");
    check(n_queued > 0,      "no request queued behind a full cell");
    check(n_empty_first > 0, "no empty cell waiting for a request");
    check(n_out_stall > 0,   "receiver never held off");
    $display("sender FIFO full %0d, receiver FIFO full %0d, queued %0d, empty-first %0d, out stalls %0d, words %0d",
             n_tx_full, n_rx_full, n_queued, n_empty_first, n_out_stall, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
