// full_adder: the 3:2 compressor.
//
// Adds three bits of equal weight and returns a sum bit of the same weight
// and a carry bit of the next weight. It is the conventional full adder that
// the compressor tree is built from; two of them in series form the 4:2
// compressor. Purely combinational. The role of the full adder as the 3:2
// compressor follows the original description; the gate form is the usual one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic ab;
  assign ab    = a ^ b;
  assign sum   = ab ^ c;
  assign carry = (a & b) | (ab & c);
endmodule
