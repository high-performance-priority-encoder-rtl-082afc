// One level of the direct-encode tree: merges four lower-level blocks.
//
// The four look-ahead signals go through the same simplified 4-to-2 encoder
// as the match lines of the first level and give the two new high address
// bits. The same look-ahead signals arbitrate the four drivers of the local
// bus, which carries the LOW_W address bits of the winning lower block. So
// resolving the priority and encoding the address happen in one step, with
// no separate one-hot "resolved" vector in between. Output a is valid when at
// least one la is 1. Purely combinational.
module pe_level #(
  parameter int unsigned LOW_W = 2 // address bits of one lower-level block
) (
  input  logic [3:0]            la,    // look-ahead of the four lower blocks
  input  logic [3:0][LOW_W-1:0] a_low, // addresses of the four lower blocks
  output logic [LOW_W+1:0]      a      // address within this block
);
  logic [3:0] en;

  pe_enc4to2 u_hi (
    .in (la),
    .a  (a[LOW_W+1:LOW_W])
  );

  pe_tri_bus #(.W(LOW_W)) u_bus (
    .la  (la),
    .din (a_low),
    .en  (en),
    .bus (a[LOW_W-1:0])
  );
endmodule
