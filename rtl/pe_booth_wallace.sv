// pe_booth_wallace: N x N unsigned multiplier, the building block (PE).
//
// The product of two unsigned N-bit operands is formed in three steps:
//   1. Radix-4 Booth partial products. The multiplier y is extended with a 0
//      to the right of its LSB and with zeros on the left until it has an
//      even number of bits and a 0 sign bit; it is then scanned in
//      overlapping 3-bit groups, G = N/2 + 1 groups. Each group selects
//      0, +-x or +-2x (booth_encoder). A negative digit is formed as the
//      one's complement of the row plus a 1 at the row's LSB; those LSB
//      ones are collected in one extra row, so the tree sees G + 1 rows.
//   2. A carry-save tree of 4:2 compressors (csa_tree42) reduces the rows
//      to a sum row and a carry row.
//   3. A carry-propagate adder adds the two rows.
// All rows are 2N bits wide and the arithmetic is modulo 2^(2N), which
// holds the full unsigned product. For N = 8 the tree sees 6 rows, for
// N = 9 also 6. Purely combinational. Booth radix-4 recoding, the 4:2
// compressor tree and the final carry-propagate adder follow the original
// description; unsigned operands, the extra row for the negation ones and the
// plain '+' as final adder are this design's choices.
module pe_booth_wallace
  import mp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,   // multiplicand
  input  logic [N-1:0]   y,   // multiplier (Booth recoded)
  output logic [2*N-1:0] p
);
  localparam int unsigned W    = 2 * N;
  localparam int unsigned G    = N / 2 + 1;
  localparam int unsigned ROWS = G + 1;

  logic [2*G:0]  y_ext;          // {zeros, y, 0}
  booth_sel_t    sel [G];
  logic [W-1:0]  rows [ROWS];
  logic [W-1:0]  neg_row;
  logic [W-1:0]  sum_r, carry_r;

  assign y_ext = {{(2*G-N){1'b0}}, y, 1'b0};

  for (genvar k = 0; k < G; k++) begin : g_pp
    logic [N:0]   mag;           // |digit| * x, at most 2x
    logic [W-1:0] row;

    booth_encoder u_enc (.grp(y_ext[2*k+2:2*k]), .sel(sel[k]));

    always_comb begin
      mag = sel[k].one ? {1'b0, x} : (sel[k].two ? {x, 1'b0} : '0);
      row = (W'(mag) ^ {W{sel[k].neg}}) << (2 * k);
    end
    assign rows[k] = row;
  end

  always_comb begin
    neg_row = '0;
    for (int k = 0; k < G; k++) neg_row[2*k] = sel[k].neg;
  end
  assign rows[G] = neg_row;

  csa_tree42 #(.ROWS(ROWS), .W(W)) u_tree (
    .rows_in(rows), .sum_o(sum_r), .carry_o(carry_r)
  );

  assign p = sum_r + carry_r;

endmodule
