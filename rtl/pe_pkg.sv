// Shared constants of the direct-encode priority encoder.
//
// The look-ahead of the 16-bit block is split into two wired-OR nodes of
// eight match lines each.
package pe_pkg;
  localparam int unsigned WOR_W   = 8;  // match lines per wired-OR node
  localparam int unsigned BLK16_W = 16; // match lines of one 16-to-4 block
endpackage
