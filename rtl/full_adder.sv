// full_adder: one-bit full adder, the cell both bypassing array multipliers
// are built from.
//
// s = x ^ y ^ z and co = majority(x, y, z). Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ z;
  assign co = (x & y) | (x & z) | (y & z);
endmodule
