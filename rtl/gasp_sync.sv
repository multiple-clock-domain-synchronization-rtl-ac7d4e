// gasp_sync: multi-flop synchroniser for one level signal entering a clock
// domain.
//
// The copy and empty indications of the interface change in one clock domain
// and are sampled in the other. Each passes through STAGES flip-flops clocked
// by the receiving domain before any logic uses it, so a sample that goes
// metastable has STAGES-1 cycles to settle. Output q follows input d after
// STAGES rising edges of clk. Asynchronous active-low reset clears the chain.
module gasp_sync #(
  parameter int unsigned STAGES = gasp_pkg::SYNC_STAGES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  initial assert (STAGES >= 1) else $error("gasp_sync: STAGES must be at least 1");

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else begin
      chain[0] <= d;
      for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];

endmodule : gasp_sync
