// 256-bit sub-block direct-encode priority encoder for a CAM.
//
// Finds the lowest-numbered asserted match line among 4**LEVELS lines and
// returns its index, in one combinational pass. The tree has fan-in four at
// every level: levels one and two are the 16-to-4 blocks (pe16); each higher
// level (pe_level) encodes the look-ahead signals of four lower blocks into
// two more address bits and selects the winning block's lower address bits
// over a shared bus. A look-ahead signal runs up the tree beside the address:
// a domino OR of the four lower dynamic look-aheads, turned static by a
// set-dominant latch at every level (pe_la_sdl). The top-level look-ahead is
// the match flag. No level reads the static look-ahead of its fourth child
// (the simplified encoder ignores it), so synthesis drops those latches.
//
// Interface: eval is the (delayed) clock of the look-ahead domino, 1 while
// evaluating. Apply ml, raise eval, and read addr and match in the same
// evaluate phase; match stays valid while eval is low again (precharge).
// addr is a don't-care when match is 0. The default LEVELS = 4 gives the
// 256-input, 8-bit-address encoder; LEVELS must be at least 2. Building the
// upper-level look-ahead as domino plus latch, like the 16-bit block's, is
// this implementation's reading of "look-ahead signals in each stage".
module pe256 #(
  parameter int unsigned LEVELS = 4,
  localparam int unsigned N  = 4 ** LEVELS, // match lines
  localparam int unsigned AW = 2 * LEVELS   // address bits
) (
  input  logic          eval,     // 1 = evaluate, 0 = precharge
  input  logic [N-1:0]  ml,       // match lines, ml[0] highest priority
  output logic [AW-1:0] addr,     // index of the first 1 in ml
  output logic          match,    // some ml is 1 (static, held in precharge)
  output logic          match_dyn // some ml is 1 (dynamic, 0 in precharge)
);
  // Level l (2..LEVELS) has N/4**l nodes, each with a 2*l-bit address and a
  // static and a dynamic look-ahead. Level 2 is the row of 16-bit blocks;
  // every higher level reads the four nodes below it from the level before.
  for (genvar l = 2; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned NN = N / (4 ** l); // nodes on this level
    logic [2*l-1:0] a    [NN];
    logic           la_s [NN];
    logic           la_d [NN];

    if (l == 2) begin : g_blk16
      for (genvar j = 0; j < NN; j++) begin : g_node
        pe16 u_pe16 (
          .eval      (eval),
          .ml        (ml[16*j +: 16]),
          .addr      (a[j]),
          .la_static (la_s[j]),
          .la_dyn    (la_d[j])
        );
      end
    end else begin : g_upper
      for (genvar j = 0; j < NN; j++) begin : g_node
        localparam int unsigned LW = 2 * (l - 1);
        logic [3:0]         la;
        logic [3:0][LW-1:0] a_low;
        logic [3:0]         la_dn;

        for (genvar k = 0; k < 4; k++) begin : g_in
          assign la[k]    = g_lvl[l-1].la_s[4*j+k];
          assign la_dn[k] = g_lvl[l-1].la_d[4*j+k];
          assign a_low[k] = g_lvl[l-1].a[4*j+k];
        end

        pe_level #(.LOW_W(LW)) u_lvl (
          .la    (la),
          .a_low (a_low),
          .a     (a[j])
        );

        pe_la_sdl #(.W(4)) u_la (
          .eval      (eval),
          .in        (la_dn),
          .la_dyn    (la_d[j]),
          .la_static (la_s[j])
        );
      end
    end
  end

  assign addr      = g_lvl[LEVELS].a[0];
  assign match     = g_lvl[LEVELS].la_s[0];
  assign match_dyn = g_lvl[LEVELS].la_d[0];
endmodule
