// switch_fifo: single-clock FIFO buffer of a network switch port.
//
// The switches of the network hold FIFO buffers at their inputs or outputs;
// in the link the sender switch's output buffer feeds the clock-crossing
// interface and the receiver switch's input buffer takes its output. Only the
// existence of these buffers is given; their organisation here is a plain
// circular buffer of DEPTH words with a read and a write pointer and an
// occupancy count, which is this implementation's own choice.
//
// Interface: push side in_valid/in_ready/in_data, pop side
// out_valid/out_ready/out_data; a word moves on a rising clk edge where valid
// and ready are both 1. out_data shows the oldest word whenever out_valid is 1
// (first-word fall-through). A word pushed into an empty FIFO is visible one
// cycle later. Push and pop may happen in the same cycle, also when full.
// Asynchronous active-low reset empties the FIFO.
module switch_fifo #(
  parameter int unsigned DATA_W = gasp_pkg::DATA_W,
  parameter int unsigned DEPTH  = gasp_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [PTR_W:0]    count;
  logic              push, pop;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    out_valid = (count != '0);
    in_ready  = (count != (PTR_W+1)'(DEPTH)) || out_ready;
    pop       = out_valid && out_ready;
    push      = in_valid && in_ready;
    out_data  = mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    count <= (PTR_W+1)'(DEPTH));

endmodule : switch_fifo
