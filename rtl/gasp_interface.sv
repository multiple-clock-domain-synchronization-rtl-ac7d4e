// gasp_interface: GasP-style FIFO interface between two synchronous modules
// clocked by independent clocks clock1 (sender) and clock2 (receiver).
//
// Structure: a sender-end control and a receiver-end control exchange two
// indications, copy (sender to receiver: buffer cell 1 was filled) and empty
// (receiver to sender: buffer cell 1 was emptied). Each control turns its own
// clock plus the indication from the other side into a one-cycle enable that
// moves data one buffer cell forward: enable1 loads cell 1 from the input
// register, enable2 copies cell 1 into cell 2. Either end may initiate a
// transfer. A sender request that finds cell 1 full stays queued until empty
// returns; an empty cell waits for the next request. The two clocks may have
// equal or arbitrary, unrelated frequencies.
//
// This is a synchronous rendering of a self-timed control. In the original,
// the full/empty state is one wire set by one side and reset by the other, and
// the enables are locally generated pulses. Here, copy and empty are toggle
// signals each owned by one domain and synchronised into the other, and the
// enables are clock enables. The cost is a few cycles of synchroniser latency
// per crossing; the block structure of the original (register, two buffer
// cells, register, two controls) is kept.
//
// Ports: put_* in the clock1 domain, get_* in the clock2 domain, both
// valid/ready; a word moves on a rising edge where valid and ready are both 1.
// Each domain has its own asynchronous active-low reset; both are expected to
// be asserted together at start-up.
// Timing, from the put edge to get_valid, with an empty interface: 2 clock1
// cycles to fill cell 1, then SYNC_STAGES+2 clock2 edges (synchroniser, cell 2,
// output register), give or take one clock2 edge of phase.
module gasp_interface #(
  parameter int unsigned DATA_W      = gasp_pkg::DATA_W,
  parameter int unsigned SYNC_STAGES = gasp_pkg::SYNC_STAGES
) (
  input  logic              clk1,
  input  logic              rst1_n,
  input  logic              put_valid,
  output logic              put_ready,
  input  logic [DATA_W-1:0] put_data,
  input  logic              clk2,
  input  logic              rst2_n,
  output logic              get_valid,
  input  logic              get_ready,
  output logic [DATA_W-1:0] get_data
);

  logic load_in, enable1, copy_tgl;
  logic load_out, enable2, empty_tgl;

  gasp_sender_ctrl #(.SYNC_STAGES(SYNC_STAGES)) u_sender_ctrl (
    .clk1     (clk1),
    .rst1_n   (rst1_n),
    .put_valid(put_valid),
    .put_ready(put_ready),
    .load_in  (load_in),
    .enable1  (enable1),
    .copy_tgl (copy_tgl),
    .empty_tgl(empty_tgl)
  );

  gasp_receiver_ctrl #(.SYNC_STAGES(SYNC_STAGES)) u_receiver_ctrl (
    .clk2     (clk2),
    .rst2_n   (rst2_n),
    .copy_tgl (copy_tgl),
    .empty_tgl(empty_tgl),
    .enable2  (enable2),
    .load_out (load_out),
    .get_valid(get_valid),
    .get_ready(get_ready)
  );

  gasp_datapath #(.DATA_W(DATA_W)) u_datapath (
    .clk1    (clk1),
    .load_in (load_in),
    .enable1 (enable1),
    .data_in (put_data),
    .clk2    (clk2),
    .enable2 (enable2),
    .load_out(load_out),
    .data_out(get_data)
  );

endmodule : gasp_interface
