// karatsuba_combine: adder/subtractor network of the 3-sub-block multiplier.
//
// Given the three sub-products of two 2N-bit operands U = {UH, UL} and
// V = {VH, VL},
//   ph = UH*VH, pl = UL*VL, pm = (UH+UL)*(VH+VL),
// it forms P = ph*2^(2N) + (pm - ph - pl)*2^N + pl:
//   - a 2N-bit adder forms ph + pl,
//   - a (2N+2)-bit subtractor forms the middle term m = pm - (ph + pl),
//   - an N-bit adder adds m[N-1:0] to pl[2N-1:N]: P[2N-1:N],
//   - a WA-bit adder adds the rest of m and the carry to ph[WA-1:0]:
//     P[2N+WA-1:2N],
//   - a (2N-WA)-bit adder adds that carry to ph[2N-1:WA]: P[4N-1:2N+WA].
// P[N-1:0] is pl[N-1:0] unchanged. For N = 8 the adder widths are 16, 8,
// 11 and 5 bits and the subtractor 18 bits; for N = 16 they are 32, 16, 19
// and 13 and the subtractor 34 bits. Purely combinational. The structure and
// the N = 8 widths follow the original block diagram, the 2N+2-bit subtractor
// its text; the carries between the output adders are added because the
// product needs them, and the N = 16 widths are scaled by this design.
module karatsuba_combine #(
  parameter int unsigned N  = 8,
  parameter int unsigned WA = N + 3
) (
  input  logic [2*N-1:0] ph,
  input  logic [2*N-1:0] pl,
  input  logic [2*N+1:0] pm,
  output logic [4*N-1:0] p
);
  localparam int unsigned WB = 2 * N - WA;

  logic [2*N:0]   s_hl;     // ph + pl
  logic [2*N+1:0] m;        // pm - ph - pl
  logic [N-1:0]   mid_lo;
  logic           c1, c2;
  logic [WA-1:0]  mid_hi;
  logic [WB-1:0]  top;

  always_comb begin
    s_hl          = {1'b0, ph} + {1'b0, pl};
    m             = pm - {1'b0, s_hl};
    {c1, mid_lo}  = {1'b0, pl[2*N-1:N]} + {1'b0, m[N-1:0]};
    {c2, mid_hi}  = {1'b0, ph[WA-1:0]} + (WA+1)'(m[2*N+1:N]) + (WA+1)'(c1);
    top           = ph[2*N-1:WA] + WB'(c2);
  end

  assign p = {top, mid_hi, mid_lo, pl[N-1:0]};

  initial begin
    assert (WA >= N + 2 && WA < 2 * N)
      else $error("karatsuba_combine: WA must lie in [N+2, 2N-1]");
  end

endmodule
