// tb_gasp_datapath: self-checking test of the interface data path.
//
// Drives random load enables on both clocks (unrelated periods) with random
// data and compares data_out with a model of the four registers: input
// register, buffer cell 1 (clock1 side), buffer cell 2 and output register
// (clock2 side). The check is made after each clock2 edge.
`timescale 1ns/1ps
module tb_gasp_datapath;
  localparam int unsigned W = 16;

  logic clk1 = 1'b0, clk2 = 1'b0;
  logic load_in = 1'b0, enable1 = 1'b0, enable2 = 1'b0, load_out = 1'b0;
  logic [W-1:0] data_in = '0, data_out;

  int checks = 0, failures = 0;

  gasp_datapath #(.DATA_W(W)) dut (.*);

  always #5 clk1 = ~clk1;
  always #8 clk2 = ~clk2;

  logic [W-1:0] m_in, m_c1, m_c2, m_out;

  // clock1 side: drive and model
  initial begin
    m_in = '0; m_c1 = '0;
    // initialise all stages through the data path first
    @(negedge clk1); load_in = 1; data_in = '0; enable1 = 1;
    @(negedge clk1);
    @(negedge clk1); load_in = 0; enable1 = 0;
    forever begin
      @(negedge clk1);
      load_in = $urandom_range(0, 1);
      enable1 = $urandom_range(0, 1);
      data_in = W'($urandom);
      @(posedge clk1);
      if (enable1) m_c1 = m_in;
      if (load_in) m_in = data_in;
    end
  end

  initial begin
    m_c2 = '0; m_out = '0;
    repeat (3) @(negedge clk2);
    enable2 = 1; load_out = 1;
    @(negedge clk2); @(negedge clk2);
    enable2 = 0; load_out = 0;
    m_c2 = '0; m_out = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk2);
      checks++;
      if (data_out !== m_out) begin
        failures++;
        $display("FAIL data_out %h expected %h at %0t", data_out, m_out, $time);
      end
      enable2  = $urandom_range(0, 1);
      load_out = $urandom_range(0, 1);
      @(posedge clk2);
      #0;
      if (load_out) m_out = m_c2;
      if (enable2)  m_c2  = dut.cell1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cell 1 must follow the clock1-side model
  always @(negedge clk1) begin
    if ($time > 40) begin
      checks++;
      if (dut.cell1 !== m_c1) begin
        failures++;
        $display("FAIL cell1 %h expected %h at %0t", dut.cell1, m_c1, $time);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
