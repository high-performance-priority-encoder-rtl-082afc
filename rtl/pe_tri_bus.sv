// Look-ahead arbitration of four bus drivers and the local bus they share.
//
// In the circuit each lower-level block drives its address bits onto one
// local bus through tri-state inverters, and the look-ahead (LA) signals of
// the four blocks decide which driver is on. Here the bus is written as an
// AND-OR multiplexer with one-hot enables, which is what a bus with exactly
// one active tri-state driver computes; the inversion of the drivers is not
// modelled, all signals are active high.
//
// Enable i is on when block i has a match and no block of higher priority
// (lower index) has one. Following the simplification used throughout the
// tree, the last driver is enabled whenever blocks 0..2 have no match, so
// exactly one driver is always on, la[3] is never looked at, and the bus value is a don't-care when
// no block matches. Purely combinational.
module pe_tri_bus #(
  parameter int unsigned W = 2 // width of the bus
) (
  input  logic [3:0]        la,  // look-ahead: block i holds a match
  input  logic [3:0][W-1:0] din, // address bits of the four blocks
  output logic [3:0]        en,  // driver enables, one-hot
  output logic [W-1:0]      bus  // the shared local bus
);
  always_comb begin
    en[0] = la[0];
    en[1] = ~la[0] & la[1];
    en[2] = ~la[0] & ~la[1] & la[2];
    en[3] = ~la[0] & ~la[1] & ~la[2];
    bus = '0;
    for (int i = 0; i < 4; i++)
      if (en[i]) bus |= din[i];
  end

  // A shared bus must never have two drivers, nor float.
  always_comb assert ($onehot(en)) else $error("pe_tri_bus: enables not one-hot: %b", en);
endmodule
