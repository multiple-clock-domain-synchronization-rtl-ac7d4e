// tb_gasp_sender_ctrl: self-checking test of the sender-end control.
//
// A behavioural receiver end, clocked by the same clock for simplicity, flips
// empty_tgl a random number of cycles after it sees cell 1 filled. A cycle
// model of the control (stored request, copy toggle, SYNC_STAGES-deep delay of
// empty_tgl) predicts put_ready, load_in, enable1 and copy_tgl every cycle.
// Both orders of events are counted: a request that has to wait for the cell
// to become empty, and an empty cell that waits for a request.
`timescale 1ns/1ps
module tb_gasp_sender_ctrl;
  localparam int unsigned SYNC = 2;

  logic clk1 = 1'b0, rst1_n = 1'b0;
  logic put_valid = 1'b0, empty_tgl = 1'b0;
  logic put_ready, load_in, enable1, copy_tgl;

  int checks = 0, failures = 0;
  int n_wait_for_empty = 0, n_wait_for_request = 0, n_enable = 0;

  gasp_sender_ctrl #(.SYNC_STAGES(SYNC)) dut (.*);

  always #5 clk1 = ~clk1;

  // reference model state
  logic             m_req, m_copy;
  logic [SYNC-1:0]  m_sync;
  logic             m_empty, m_en, m_ready, m_load;

  always_comb begin
    m_empty = (m_copy == m_sync[SYNC-1]);
    m_en    = m_req && m_empty;
    m_ready = !m_req || m_en;
    m_load  = put_valid && m_ready;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  int rx_delay = -1;
  initial begin
    m_req = 0; m_copy = 0; m_sync = '0;
    repeat (2) @(posedge clk1);
    rst1_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk1);
      // behavioural receiver end: empties cell 1 some cycles after it fills
      if (copy_tgl != empty_tgl) begin
        if (rx_delay < 0) rx_delay = $urandom_range(0, 6);
        else if (rx_delay == 0) begin empty_tgl = ~empty_tgl; rx_delay = -1; end
        else rx_delay--;
      end
      put_valid = ($urandom_range(0, 3) != 0);
      #1;
      check(put_ready, m_ready, "put_ready");
      check(load_in,   m_load,  "load_in");
      check(enable1,   m_en,    "enable1");
      check(copy_tgl,  m_copy,  "copy_tgl");
      if (m_req && !m_empty) n_wait_for_empty++;
      if (!m_req && m_empty && m_load) n_wait_for_request++;
      if (m_en) n_enable++;
      @(posedge clk1);
      // advance model on the same edge
      if (m_en) m_copy = ~m_copy;
      if (m_load) m_req = 1; else if (m_en) m_req = 0;
      m_sync = {m_sync[SYNC-2:0], empty_tgl};
    end
    checks++; if (n_wait_for_empty == 0)   begin failures++; $display("FAIL: no queued request seen"); end
    checks++; if (n_wait_for_request == 0) begin failures++; $display("FAIL: no empty-first transfer seen"); end
    checks++; if (n_enable < 100)          begin failures++; $display("FAIL: only %0d enables", n_enable); end
    $display("queued requests %0d, empty-first %0d, enables %0d", n_wait_for_empty, n_wait_for_request, n_enable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
