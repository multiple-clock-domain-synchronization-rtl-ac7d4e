// tb_gasp_receiver_ctrl: self-checking test of the receiver-end control.
//
// A behavioural sender end flips copy_tgl (fills cell 1) at random times while
// cell 1 is empty, and the receiver reads with a random get_ready. A cycle
// model (SYNC_STAGES-deep delay of copy_tgl, empty toggle, cell-2 and
// output-register occupancy) predicts enable2, load_out, get_valid and
// empty_tgl every cycle. Counts receiver back-pressure, cycles where a full
// cell 1 waits for cell 2, and transfers.
`timescale 1ns/1ps
module tb_gasp_receiver_ctrl;
  localparam int unsigned SYNC = 2;

  logic clk2 = 1'b0, rst2_n = 1'b0;
  logic copy_tgl = 1'b0, get_ready = 1'b0;
  logic empty_tgl, enable2, load_out, get_valid;

  int checks = 0, failures = 0;
  int n_stall = 0, n_cell2_busy = 0, n_enable = 0, n_read = 0;

  gasp_receiver_ctrl #(.SYNC_STAGES(SYNC)) dut (.*);

  always #7 clk2 = ~clk2;

  logic            m_empty_tgl, m_c2, m_out;
  logic [SYNC-1:0] m_sync;
  logic            m_c1, m_load, m_en;

  always_comb begin
    m_c1   = (m_sync[SYNC-1] != m_empty_tgl);
    m_load = m_c2 && (!m_out || get_ready);
    m_en   = m_c1 && (!m_c2 || m_load);
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    m_empty_tgl = 0; m_c2 = 0; m_out = 0; m_sync = '0;
    repeat (2) @(posedge clk2);
    rst2_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk2);
      // behavioural sender end: fill cell 1 only when it knows it is empty
      if (copy_tgl == empty_tgl && $urandom_range(0, 2) == 0) copy_tgl = ~copy_tgl;
      // alternate receiver pauses with eager reading
      get_ready = (((cyc / 50) % 2) != 0) ? ($urandom_range(0, 5) == 0) : ($urandom_range(0, 2) != 0);
      #1;
      check(enable2,   m_en,        "enable2");
      check(load_out,  m_load,      "load_out");
      check(get_valid, m_out,       "get_valid");
      check(empty_tgl, m_empty_tgl, "empty_tgl");
      if (m_out && !get_ready) n_stall++;
      if (m_c1 && m_c2 && !m_load) n_cell2_busy++;
      if (m_en) n_enable++;
      if (m_out && get_ready) n_read++;
      @(posedge clk2);
      if (m_en) m_empty_tgl = ~m_empty_tgl;
      if (m_en) m_c2 = 1; else if (m_load) m_c2 = 0;
      if (m_load) m_out = 1; else if (m_out && get_ready) m_out = 0;
      m_sync = {m_sync[SYNC-2:0], copy_tgl};
    end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL: no receiver stall"); end
    checks++; if (n_cell2_busy == 0) begin failures++; $display("FAIL: cell 1 never waited for cell 2"); end
    checks++; if (n_enable < 100) begin failures++; $display("FAIL: only %0d enables", n_enable); end
    checks++; if (n_read < 100)   begin failures++; $display("FAIL: only %0d reads", n_read); end
    $display("cell 1 waiting %0d, stalls %0d, enables %0d, reads %0d", n_cell2_busy, n_stall, n_enable, n_read);
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
