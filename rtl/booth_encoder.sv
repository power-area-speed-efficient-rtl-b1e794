// booth_encoder: radix-4 Booth recoding of one multiplier group.
//
// Takes three overlapping multiplier bits {b[2i+1], b[2i], b[2i-1]} and
// returns the partial-product selection: 0, +X, -X, +2X or -2X, following
// the radix-4 Booth table (000->0, 001/010->+X, 011->+2X, 100->-2X,
// 101/110->-X, 111->0). The digit is given in sign/magnitude form
// (mp_pkg::booth_sel_t); 111 yields neg=0 so a zero digit never asks for
// a two's complement. Purely combinational. The table follows the original
// description; the (neg, one, two) encoding is this design's choice.
module booth_encoder
  import mp_pkg::*;
(
  input  logic [2:0]  grp,
  output booth_sel_t  sel
);
  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp == 3'b011) || (grp == 3'b100);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end
endmodule
