// gasp_link: one inter-switch link of a network on chip whose two switches run
// on independent clocks clock1 and clock2.
//
// The sender switch's FIFO buffer (clock1) feeds a GasP-style clock-crossing
// interface, whose output fills the receiver switch's FIFO buffer (clock2):
//
//   in_*  -> switch_fifo (clk1) -> gasp_interface (clk1 | clk2)
//                               -> switch_fifo (clk2) -> out_*
//
// This is the arrangement in which the interface is evaluated: two
// communicating switch blocks with different clocks, their FIFO buffers, the
// interface circuitry at each end and the control signals between them. The
// wire between the two switches is not modelled; the routing logic of the
// switches lies outside the link and connects to in_* and out_*.
//
// Ports: in_* is the sender switch's side (clock1 domain), out_* the receiver
// switch's side (clock2 domain), both valid/ready with a word moving on a
// rising edge where both are 1. rst1_n and rst2_n are asynchronous active-low
// resets of the two domains, to be asserted together.
module gasp_link #(
  parameter int unsigned DATA_W      = gasp_pkg::DATA_W,
  parameter int unsigned SYNC_STAGES = gasp_pkg::SYNC_STAGES,
  parameter int unsigned FIFO_DEPTH  = gasp_pkg::FIFO_DEPTH
) (
  input  logic              clk1,
  input  logic              rst1_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              clk2,
  input  logic              rst2_n,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);

  logic              tx_valid, tx_ready;
  logic [DATA_W-1:0] tx_data;
  logic              rx_valid, rx_ready;
  logic [DATA_W-1:0] rx_data;

  switch_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk      (clk1),
    .rst_n    (rst1_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  (in_data),
    .out_valid(tx_valid),
    .out_ready(tx_ready),
    .out_data (tx_data)
  );

  gasp_interface #(.DATA_W(DATA_W), .SYNC_STAGES(SYNC_STAGES)) u_if (
    .clk1     (clk1),
    .rst1_n   (rst1_n),
    .put_valid(tx_valid),
    .put_ready(tx_ready),
    .put_data (tx_data),
    .clk2     (clk2),
    .rst2_n   (rst2_n),
    .get_valid(rx_valid),
    .get_ready(rx_ready),
    .get_data (rx_data)
  );

  switch_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk      (clk2),
    .rst_n    (rst2_n),
    .in_valid (rx_valid),
    .in_ready (rx_ready),
    .in_data  (rx_data),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (out_data)
  );

endmodule : gasp_link
