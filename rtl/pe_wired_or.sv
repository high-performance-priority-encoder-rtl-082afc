// Footless precharged wired-OR node of the look-ahead path (logic model).
//
// In the circuit one pull-down transistor per input hangs on a shared node
// that is precharged high; the node has no foot transistor, so its inputs
// must be low while it precharges. The node falls, monotonically, during
// evaluation when any input is 1. This module gives the node's logic value:
// node_n = 0 exactly when eval = 1 and some input is 1, and 1 (precharged)
// otherwise. The precharge device and the timing of the real node are not
// modelled. W is eight in the 16-bit block, as drawn for the circuit.
module pe_wired_or #(
  parameter int unsigned W = pe_pkg::WOR_W // inputs on the node
) (
  input  logic         eval,  // 1 = evaluate, 0 = precharge
  input  logic [W-1:0] in,    // match lines or lower look-ahead signals
  output logic         node_n // dynamic node, active low
);
  always_comb node_n = ~(eval & (|in));
endmodule
