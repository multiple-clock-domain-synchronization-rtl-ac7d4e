// gasp_datapath: the data path of the GasP-style interface: input register,
// two buffer cells and output register, in that order.
//
// Words move one stage per load enable:
//   data_in  --(clock1, load_in)-->  in_reg
//   in_reg   --(clock1, enable1)-->  cell1     (buffer cell at the sender end)
//   cell1    --(clock2, enable2)-->  cell2     (buffer cell at the receiver end)
//   cell2    --(clock2, load_out)--> data_out  (output register)
// The crossing between clock domains is from cell1 to cell2. It is safe
// because the controls only raise enable2 after cell 1 was filled and the fact
// has passed a synchroniser, and never refill cell 1 before enable2 has
// emptied it and that fact has passed back: cell1 is stable whenever clock2
// samples it.
//
// The buffer cells of the original are storage elements opened by a
// self-timed enable pulse; here they are edge-triggered registers with a load
// enable, clocked by the clock of their own end. The registers keep their
// content without a reset; the controls say which of them hold valid data.
module gasp_datapath #(
  parameter int unsigned DATA_W = gasp_pkg::DATA_W
) (
  input  logic              clk1,
  input  logic              load_in,
  input  logic              enable1,
  input  logic [DATA_W-1:0] data_in,
  input  logic              clk2,
  input  logic              enable2,
  input  logic              load_out,
  output logic [DATA_W-1:0] data_out
);

  logic [DATA_W-1:0] in_reg;
  logic [DATA_W-1:0] cell1;
  logic [DATA_W-1:0] cell2;

  always_ff @(posedge clk1) begin
    if (enable1) cell1  <= in_reg;
    if (load_in) in_reg <= data_in;
  end

  always_ff @(posedge clk2) begin
    if (enable2)  cell2    <= cell1;
    if (load_out) data_out <= cell2;
  end

endmodule : gasp_datapath
