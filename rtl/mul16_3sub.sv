// mul16_3sub: 2N x 2N three-sub-block multiplier that can also split into
// three independent N x N multipliers (N = 8: one 16x16 or three 8x8).
//
// Whole mode (split = 0): U = a[2N-1:0] and V = b[2N-1:0] are cut into N-bit
// halves. Two N-bit adders form U1 = UH + UL and V1 = VH + VL (N+1 bits).
// Three Booth/4:2-compressor PEs form UH*VH and UL*VL (N x N) and U1*V1
// ((N+1) x (N+1)); karatsuba_combine turns them into the 4N-bit product on
// p[4N-1:0]; p[6N-1:4N] is 0.
// Split mode (split = 1): the same three PEs serve three lanes,
//   lane 0: a[N-1:0]    * b[N-1:0]    -> p[2N-1:0]   (UL*VL PE)
//   lane 1: a[2N-1:N]   * b[2N-1:N]   -> p[4N-1:2N]  (UH*VH PE)
//   lane 2: a[3N-1:2N]  * b[3N-1:2N]  -> p[6N-1:4N]  (U1*V1 PE, operands
//                                                     zero-extended)
// a[3N-1:2N] and b[3N-1:2N] are ignored in whole mode. Purely combinational.
// The whole-mode structure (pre-adders, PE 8x8, PE 9x9, PE 8x8, recombination)
// follows the original block diagram; the split mode and its lane order are
// this design's reading of the building blocks working independently.
module mul16_3sub #(
  parameter int unsigned N  = 8,
  parameter int unsigned WA = N + 3
) (
  input  logic           split,
  input  logic [3*N-1:0] a,
  input  logic [3*N-1:0] b,
  output logic [6*N-1:0] p
);
  logic [N-1:0]   uh, ul, vh, vl;
  logic [N:0]     u1, v1;
  logic [2*N-1:0] ph, pl;
  logic [2*N+1:0] pm;
  logic [4*N-1:0] pw;

  assign ul = a[N-1:0];
  assign uh = a[2*N-1:N];
  assign vl = b[N-1:0];
  assign vh = b[2*N-1:N];

  // "Add 8 bit" pre-adders; in split mode they pass the third lane through.
  assign u1 = split ? {1'b0, a[3*N-1:2*N]} : {1'b0, uh} + {1'b0, ul};
  assign v1 = split ? {1'b0, b[3*N-1:2*N]} : {1'b0, vh} + {1'b0, vl};

  pe_booth_wallace #(.N(N))   u_pe_h (.x(uh), .y(vh), .p(ph));
  pe_booth_wallace #(.N(N+1)) u_pe_m (.x(u1), .y(v1), .p(pm));
  pe_booth_wallace #(.N(N))   u_pe_l (.x(ul), .y(vl), .p(pl));

  karatsuba_combine #(.N(N), .WA(WA)) u_comb (.ph(ph), .pl(pl), .pm(pm), .p(pw));

  assign p = split ? {pm[2*N-1:0], ph, pl} : {(2*N)'(0), pw};

endmodule
