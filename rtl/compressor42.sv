// compressor42: exact 4:2 compressor.
//
// Four bits x1..x4 of weight j and a carry-in cin from the compressor of
// weight j-1 are reduced to one sum bit of weight j and two bits of weight
// j+1 (carry and cout). It is two 3:2 compressors (full adders) in series:
// the first adds x1..x3, the second adds its sum, x4 and cin. cout is taken
// from the first stage only, so it never depends on cin and a row of these
// compressors has no rippling carry chain. Invariant:
//   x1 + x2 + x3 + x4 + cin == sum + 2*(carry + cout).
// Purely combinational. The two-full-adder structure and the independence
// of cout from cin follow the original description; which inputs enter
// which full adder is this design's choice.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2),  .c(x3),  .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(x4),  .c(cin), .sum(sum), .carry(carry));
endmodule
