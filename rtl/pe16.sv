// 16-to-4 direct-encode priority encoder block (levels one and two).
//
// The 16 match lines ml[15:0] (ml[0] has the highest priority) form four
// groups of four. Each group has a static 4-to-2 encoder for address bits
// 1:0 and a group-match signal (the OR of its four lines). The group-match
// signals are encoded by a second 4-to-2 encoder into address bits 3:2 and
// also arbitrate which group drives its two bits onto the block's shared bus.
// A group without a match produces a wrong 4-to-2 result, but its driver is
// never enabled. Alongside, a split-node domino look-ahead over all 16 lines
// gives la_dyn and, through the set-dominant latch, la_static, which the next
// level uses to arbitrate among 16-bit blocks.
//
// Timing: addr follows ml combinationally and is valid whenever some ml is
// 1; la_static is valid during evaluation (eval = 1) and held while eval = 0.
// Using the OR of four lines as the group-match signal is this
// implementation's choice: the wiring of these signals is not spelled out.
module pe16 (
  input  logic        eval,      // 1 = evaluate, 0 = precharge
  input  logic [15:0] ml,        // match lines, ml[0] highest priority
  output logic [3:0]  addr,      // index of the first 1 in ml (valid if any)
  output logic        la_static, // some ml is 1 (static, latched)
  output logic        la_dyn     // some ml is 1 (dynamic)
);
  logic [3:0]      grp;   // group g holds a match
  logic [3:0][1:0] a_low; // first-level encoded bits per group

  for (genvar g = 0; g < 4; g++) begin : g_grp
    pe_enc4to2 u_enc (
      .in (ml[4*g +: 4]),
      .a  (a_low[g])
    );
    assign grp[g] = |ml[4*g +: 4];
  end

  pe_level #(.LOW_W(2)) u_lvl (
    .la    (grp),
    .a_low (a_low),
    .a     (addr)
  );

  pe_la_sdl #(.W(16)) u_la (
    .eval      (eval),
    .in        (ml),
    .la_dyn    (la_dyn),
    .la_static (la_static)
  );
endmodule
