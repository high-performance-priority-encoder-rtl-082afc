// Split-node domino look-ahead with a set-dominant latch (SDL) interface.
//
// The W inputs are split over two footless wired-OR nodes of W/2 inputs
// each (two nodes of eight for a 16-bit block). The two nodes are combined
// into the dynamic look-ahead la_dyn, which is 1 while evaluating when any
// input is 1 and returns to 0 during precharge. The SDL turns it into a
// static signal for the static encoder gates: it is transparent while eval
// is 1, so it takes up the monotonic transition of the domino node, and it
// holds its value through precharge, so the static logic downstream does not
// switch again when the domino nodes precharge. la_static is therefore a
// level-sensitive latch on purpose; that is the interface the design uses,
// and the latch that synthesis reports for it is intended. (Inside larger
// blocks a lint pass may claim that no latch is found here; the block does
// hold its value while eval is 0, which the tests check.)
//
// The circuit drives the latch from a delayed copy of the domino clock; here
// both use the single eval input, which is this implementation's
// simplification.
module pe_la_sdl #(
  parameter int unsigned W = pe_pkg::BLK16_W // inputs, split in two halves
) (
  input  logic         eval,      // 1 = evaluate, 0 = precharge
  input  logic [W-1:0] in,        // match lines or lower look-ahead signals
  output logic         la_dyn,    // LA (dynamic), 0 in precharge
  output logic         la_static  // LA (static), held through precharge
);
  localparam int unsigned H = W / 2;

  logic node_a_n, node_b_n;

  pe_wired_or #(.W(H)) u_wor_a (
    .eval   (eval),
    .in     (in[H-1:0]),
    .node_n (node_a_n)
  );

  pe_wired_or #(.W(W-H)) u_wor_b (
    .eval   (eval),
    .in     (in[W-1:H]),
    .node_n (node_b_n)
  );

  // The split nodes are merged: a match on either half raises la_dyn.
  always_comb la_dyn = ~(node_a_n & node_b_n);

  // Set-dominant latch: open while evaluating, holding through precharge.
  always_latch begin
    if (eval) la_static = la_dyn;
  end
endmodule
