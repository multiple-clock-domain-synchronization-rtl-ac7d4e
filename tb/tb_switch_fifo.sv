// tb_switch_fifo: self-checking test of the switch FIFO buffer.
//
// Random pushes and pops against a queue model. Checks out_valid, in_ready
// (full/not full), the word at the head and the capacity (DEPTH words).
// Counts cycles spent full, empty, and with simultaneous push and pop.
`timescale 1ns/1ps
module tb_switch_fifo;
  localparam int unsigned W = 8, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic [W-1:0] in_data = '0;
  logic in_ready, out_valid;
  logic [W-1:0] out_data;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0, n_pop = 0;
  logic [W-1:0] q[$];

  switch_fifo #(.DATA_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // phases that favour filling and draining
      in_valid  = ($urandom_range(0, 9) < ((cyc / 400) % 2 ? 3 : 8));
      out_ready = ($urandom_range(0, 9) < ((cyc / 400) % 2 ? 8 : 3));
      in_data   = W'($urandom);
      #1;
      check(W'(out_valid), W'(q.size() != 0), "out_valid");
      check(W'(in_ready), W'(q.size() < D || out_ready), "in_ready");
      if (q.size() != 0) check(out_data, q[0], "out_data");
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready && in_valid && in_ready) n_both++;
      if (out_valid && out_ready) begin void'(q.pop_front()); n_pop++; end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (n_full == 0)  begin failures++; $display("FAIL: never full"); end
    checks++; if (n_empty == 0) begin failures++; $display("FAIL: never empty"); end
    checks++; if (n_both == 0)  begin failures++; $display("FAIL: no push+pop cycle"); end
    $display("full %0d, empty %0d, push+pop %0d, pops %0d", n_full, n_empty, n_both, n_pop);
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
