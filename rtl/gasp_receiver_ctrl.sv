// gasp_receiver_ctrl: receiver-end FIFO control of the GasP-style interface,
// clocked by clock2.
//
// The receiver end sees copy_tgl from the sender end through a SYNC_STAGES
// flip-flop synchroniser. Buffer cell 1 holds a word for it (the copy
// indication) when the synchronised copy_tgl differs from its own empty_tgl.
// enable2 is asserted for one clock2 cycle when cell 1 holds a word and
// buffer cell 2 is free or being emptied in the same cycle; it copies cell 1
// into cell 2 and flips empty_tgl, which tells the sender end that cell 1 is
// empty again. The receiver also initiates transfers: a word in cell 2 is moved
// into the output register as soon as that register is free or is being read
// (load_out), so a receiver that reads makes room that pulls the next word on.
//
// The enable-from-two-conditions structure follows the description of the
// control (a stored request plus the full/empty state). The toggle encoding,
// the synchroniser and the valid/ready port on the receiver side are this
// implementation's own choices.
//
// Interface (clock2 domain):
//   copy_tgl             from the sender end, asynchronous to clock2.
//   empty_tgl            to the sender end: cell 1 was emptied.
//   enable2              load enable of buffer cell 2 (the local clock).
//   load_out             load enable of the output register.
//   get_valid/get_ready  the output register holds a word; it is read on a
//                        rising clock2 edge where both are 1.
// Timing: a word in cell 1 reaches cell 2 SYNC_STAGES+1 clock2 cycles after
// the edge that filled cell 1 is seen, and the output register one cycle later.
module gasp_receiver_ctrl #(
  parameter int unsigned SYNC_STAGES = gasp_pkg::SYNC_STAGES
) (
  input  logic clk2,
  input  logic rst2_n,
  input  logic copy_tgl,
  output logic empty_tgl,
  output logic enable2,
  output logic load_out,
  output logic get_valid,
  input  logic get_ready
);

  logic copy_tgl_s;   // copy_tgl seen in clock2
  logic cell1_full;   // the copy indication: cell 1 holds a word
  logic cell2_full;   // buffer cell 2 holds a word
  logic out_full;     // the output register holds a word

  gasp_sync #(.STAGES(SYNC_STAGES)) u_sync_copy (
    .clk  (clk2),
    .rst_n(rst2_n),
    .d    (copy_tgl),
    .q    (copy_tgl_s)
  );

  always_comb begin
    cell1_full = (copy_tgl_s != empty_tgl);
    load_out   = cell2_full && (!out_full || get_ready);
    enable2    = cell1_full && (!cell2_full || load_out);
    get_valid  = out_full;
  end

  always_ff @(posedge clk2 or negedge rst2_n) begin
    if (!rst2_n) begin
      empty_tgl  <= 1'b0;
      cell2_full <= 1'b0;
      out_full   <= 1'b0;
    end else begin
      if (enable2)                   empty_tgl  <= ~empty_tgl;
      if (enable2)                   cell2_full <= 1'b1;
      else if (load_out)             cell2_full <= 1'b0;
      if (load_out)                  out_full   <= 1'b1;
      else if (get_valid && get_ready) out_full <= 1'b0;
    end
  end

  // Cell 2 is never overwritten while it still holds an unmoved word.
  a_no_overwrite : assert property (@(posedge clk2) disable iff (!rst2_n)
    enable2 |-> (!cell2_full || load_out));

endmodule : gasp_receiver_ctrl
