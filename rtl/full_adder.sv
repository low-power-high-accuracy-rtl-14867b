// full_adder: one-bit full adder, i.e. a 3:2 compressor.
//
// Adds three bits of equal weight: s = a ^ b ^ ci (weight 1) and
// co = majority(a, b, ci) (weight 2). Purely combinational. It is the basic
// counter from which the exact 4:2 compressor and the low columns of the
// reduction tree are built.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
