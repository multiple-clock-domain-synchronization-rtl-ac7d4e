// gasp_sender_ctrl: sender-end FIFO control of the GasP-style interface,
// clocked by clock1.
//
// The control holds two pieces of state, named after the nodes of the
// transistor-level control circuit it stands in for:
//   * req_stored (node A_bar): the sender has put a word into the input
//     register and it waits to be moved into buffer cell 1. It is set by the
//     sender's request on clock1 and cleared when the enable fires.
//   * cell_empty (node C): buffer cell 1 is empty. A logic 0 here means full.
// enable1 (node B_bar) is asserted for one clock1 cycle when a request is
// stored and the cell is empty; it loads buffer cell 1 from the input register
// and marks the cell full. As in the description, either side may come first:
// if the request arrives while the cell is full it stays queued until the
// receiver end frees the cell (case clock2 slower); if the cell is already
// empty when the request arrives the enable follows in the next clock1 cycle,
// once the word is stable in the input register (case clock1 slower).
//
// Departure from the self-timed original: the single bidirectional full/empty
// wire is split into two toggling signals, copy_tgl (owned here, flips each
// time cell 1 is filled) and empty_tgl (owned by the receiver end, flips each
// time cell 1 is emptied). Cell 1 is empty exactly when the two are equal.
// empty_tgl is brought into clock1 through a SYNC_STAGES flip-flop
// synchroniser; this implementation's choice, which adds SYNC_STAGES clock1
// cycles to the time before a freed cell can be refilled.
//
// Interface (clock1 domain, valid/ready):
//   put_valid/put_ready  the sender offers a word; a word is taken on a rising
//                        clock1 edge where both are 1 (load_in pulses then).
//   load_in              load enable of the input register.
//   enable1              load enable of buffer cell 1 (the local clock).
//   copy_tgl             to the receiver end: cell 1 was filled.
//   empty_tgl            from the receiver end, asynchronous to clock1.
// Timing: a word accepted in cycle t is in cell 1 at the end of cycle t+1 when
// the cell is empty; put_ready stays 1 in that case so words may stream.
module gasp_sender_ctrl #(
  parameter int unsigned SYNC_STAGES = gasp_pkg::SYNC_STAGES
) (
  input  logic clk1,
  input  logic rst1_n,
  input  logic put_valid,
  output logic put_ready,
  output logic load_in,
  output logic enable1,
  output logic copy_tgl,
  input  logic empty_tgl
);

  logic req_stored;     // node A_bar: a request waits in the input register
  logic empty_tgl_s;    // empty_tgl seen in clock1
  logic cell_empty;     // node C: buffer cell 1 empty (0 = full)

  gasp_sync #(.STAGES(SYNC_STAGES)) u_sync_empty (
    .clk  (clk1),
    .rst_n(rst1_n),
    .d    (empty_tgl),
    .q    (empty_tgl_s)
  );

  always_comb begin
    cell_empty = (copy_tgl == empty_tgl_s);
    enable1    = req_stored && cell_empty;
    put_ready  = !req_stored || enable1;
    load_in    = put_valid && put_ready;
  end

  always_ff @(posedge clk1 or negedge rst1_n) begin
    if (!rst1_n) begin
      req_stored <= 1'b0;
      copy_tgl   <= 1'b0;
    end else begin
      if (load_in)      req_stored <= 1'b1;
      else if (enable1) req_stored <= 1'b0;
      if (enable1)      copy_tgl   <= ~copy_tgl;
    end
  end

  // An enable is only ever generated into an empty cell.
  a_enable_into_empty : assert property (@(posedge clk1) disable iff (!rst1_n)
    enable1 |-> cell_empty);

  // The sender holds its word while it is not taken.
  a_no_load_while_held : assert property (@(posedge clk1) disable iff (!rst1_n)
    load_in |-> (!req_stored || enable1));

endmodule : gasp_sender_ctrl
