// Static 4-to-2 priority encoder in its simplified form.
//
// Input 0 has the highest priority. The two address bits are
//   a[1] = ~in[0] & ~in[1]
//   a[0] = ~in[0] & (in[1] | ~in[2])
// which give the index of the lowest-numbered 1 only when at least one input
// is 1. When all four inputs are 0 the output is 3, a wrong value that the
// level above never selects, because its look-ahead arbitration skips a block
// without a match. Dropping the all-zero case is what keeps the gate small;
// the equations are the ones the design is built on, the port names are this
// implementation's. in[3] does not appear in the equations: a 3 is the
// answer whenever inputs 0..2 are all 0. The same module encodes match lines at the first level
// and look-ahead signals at every higher level. Purely combinational.
module pe_enc4to2 (
  input  logic [3:0] in, // in[0] = highest priority
  output logic [1:0] a   // encoded index, valid when |in
);
  always_comb begin
    a[1] = ~in[0] & ~in[1];
    a[0] = ~in[0] & (in[1] | ~in[2]);
  end
endmodule
