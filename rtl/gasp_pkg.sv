// gasp_pkg: constants shared by the GasP-style clock-domain-crossing link.
//
// The original interface is sized by its data bus width, which is not fixed
// by the design description; the defaults below are this implementation's own
// choices. SYNC_STAGES is the depth of the flip-flop synchronisers that carry
// the copy and empty state indications between the two clock domains in this
// synchronous rendering of the self-timed control.
package gasp_pkg;

  // Width of one data word (flit) carried across the interface.
  parameter int unsigned DATA_W = 32;

  // Flip-flops in each control-signal synchroniser.
  parameter int unsigned SYNC_STAGES = 2;

  // Entries in each switch FIFO buffer.
  parameter int unsigned FIFO_DEPTH = 4;

endpackage : gasp_pkg
